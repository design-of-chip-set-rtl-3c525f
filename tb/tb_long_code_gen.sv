// tb_long_code_gen: compares the long code generator with a reference recurrence built
// here from the exponents of the 42nd-degree polynomial, for random masks, including a
// state load in the middle. The output chip must equal the parity of state AND mask.
module tb_long_code_gen;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, step = 0, load = 0;
  logic [41:0] load_state = '0, mask = '0, state; logic lc;
  int checks = 0, failures = 0;
  long_code_gen dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int exps[20] = '{35,33,31,27,26,25,22,21,19,18,17,16,10,7,6,5,3,2,1,0};
  logic [41:0] ref_s;   // ref_s[k-1] = element k-1 steps ago (bit 0 newest)
  function automatic logic [41:0] adv(input logic [41:0] s);
    logic x; x = 1'b0;
    foreach (exps[j]) x ^= s[41 - exps[j]];      // element (42 - e) steps back
    return {s[40:0], x};
  endfunction
  initial begin
    ref_s = 42'd1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) mask = {$urandom, $urandom} & 42'h3FF_FFFF_FFFF;
      #1;
      checks++;
      if (state !== ref_s || lc !== ^(ref_s & mask)) begin
        failures++; if (failures < 5) $display("FAIL n=%0d state %h ref %h", n, state, ref_s);
      end
      if (n == 1500) begin
        load = 1; load_state = 42'h2AB_CDEF_0123; ref_s = load_state;
      end else begin
        step = ($urandom % 3) != 0; if (step) ref_s = adv(ref_s);
      end
      @(negedge clk); load = 0; step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
