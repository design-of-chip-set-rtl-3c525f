// tb_data_burst_randomizer: for random 14-bit long code blocks, compares the gating
// mask with the standard's selection rules written out here group by group, and checks
// the group counts (16, 8, 4, 2) and that each lower rate's groups are a subset of the
// next higher rate's.
module tb_data_burst_randomizer;
  timeunit 1ns; timeprecision 1ns;
  import cdma_pkg::*;
  rate_e rate; logic [13:0] b; logic [15:0] pcg_mask;
  int checks = 0, failures = 0;
  data_burst_randomizer dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [15:0] m [4], e [4];
  function automatic int pos(input int p); return p; endfunction
  initial begin
    for (int t = 0; t < 2000; t++) begin
      b = 14'($urandom);
      for (int r = 0; r < 4; r++) begin rate = rate_e'(r); #1; m[r] = pcg_mask; end
      e[0] = 16'hFFFF; e[1] = 0; e[2] = 0; e[3] = 0;
      for (int i = 0; i < 8; i++) e[1][2*i + b[i]] = 1;
      e[2][ b[8]  ? 2 + b[1] : b[0]]      = 1;
      e[2][ b[9]  ? 6 + b[3] : 4 + b[2]]  = 1;
      e[2][ b[10] ? 10 + b[5] : 8 + b[4]] = 1;
      e[2][ b[11] ? 14 + b[7] : 12 + b[6]] = 1;
      if (!b[12]) e[3][b[8] ? 2 + b[1] : b[0]] = 1;       else e[3][b[9] ? 6 + b[3] : 4 + b[2]] = 1;
      if (!b[13]) e[3][b[10] ? 10 + b[5] : 8 + b[4]] = 1; else e[3][b[11] ? 14 + b[7] : 12 + b[6]] = 1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (m[r] !== e[r] || $countones(m[r]) != (16 >> r)) begin
          failures++; if (failures < 5) $display("FAIL b=%h r=%0d got %h exp %h", b, r, m[r], e[r]);
        end
        if (r > 0) begin checks++; if ((m[r] & ~m[r-1]) != 0) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
