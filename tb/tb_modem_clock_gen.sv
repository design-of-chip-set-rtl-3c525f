// tb_modem_clock_gen: checks the modem timing generator at its default 8 clocks per
// chip: en_x4 every 2 clocks and en_x2 every 4 clocks, phase aligned with the chip
// boundary; chip_time advancing once per 8 clocks; a sleep of a random number of chips
// stopping both enables for exactly that many chips while chip_time keeps counting,
// then one wake pulse. Counts are computed here from the clock count.
module tb_modem_clock_gen;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, sleep_req = 0;
  logic [15:0] sleep_chips = 0;
  logic en_x4, en_x2, asleep, wake;
  logic [31:0] chip_time;
  int checks = 0, failures = 0;
  modem_clock_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n4, n2, nwake, cyc;
  always @(posedge clk) if (rst_n) begin
    n4 += int'(en_x4); n2 += int'(en_x2); nwake += int'(wake); cyc++;
  end

  initial begin
    int t0, ns, c0;
    n4 = 0; n2 = 0; nwake = 0; cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (800) @(negedge clk);
    check(n4 == 400 && n2 == 200, $sformatf("enables %0d %0d", n4, n2));
    check(chip_time == 32'd100, $sformatf("chip_time %0d", chip_time));
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      if (en_x2) check(en_x4, "en_x2 implies en_x4");
    end
    for (int r = 0; r < 3; r++) begin
      ns = int'($urandom_range(3, 40));
      @(negedge clk); while (!(en_x2 && cyc % 8 == 0)) @(negedge clk);
      t0 = n2; c0 = int'(chip_time);
      sleep_req = 1; sleep_chips = 16'(ns); @(negedge clk); sleep_req = 0;
      check(asleep, "asleep after request");
      while (asleep) @(negedge clk);
      @(negedge clk);
      check(nwake == r + 1, "one wake pulse");
      check(n2 - t0 <= 2, $sformatf("no receive enables while asleep: %0d", n2 - t0));
      check(int'(chip_time) - c0 >= ns && int'(chip_time) - c0 <= ns + 1,
            $sformatf("time ran %0d chips during a %0d chip sleep", int'(chip_time) - c0, ns));
      repeat (16) @(negedge clk);
      check(!asleep, "running after wake");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
