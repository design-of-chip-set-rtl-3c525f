// tb_up_interface: checks the modem's host register interface. Control registers are
// written and read back; the transmit FIFO takes words until full and the bits leave
// MSB first under the modulator's ready signal; decoded bits are packed into 16-bit
// words (a frame's last partial word left aligned) and popped by reads; a searcher
// result is held until its flags are read; interrupt status bits set, raise irq only
// when unmasked and clear on a write of ones; a finger slew write pulses that finger's
// request. Expected values are built here.
module tb_up_interface;
  timeunit 1ns; timeprecision 1ns;
  localparam int NF = 3;
  logic clk = 0, rst_n = 0;
  logic bus_cs = 0, bus_wr = 0; logic [7:0] bus_addr = 0; logic [15:0] bus_wdata = 0, bus_rdata;
  logic irq, tx_enable, iq_sel, tx_bit_valid, tx_bit, tx_bit_ready = 0; logic [1:0] tx_rate;
  logic [41:0] lc_mask, lc_state;
  logic srch_start, srch_busy = 0, srch_done = 0, srch_res_valid = 0, srch_res_pass = 0, srch_res_dwell2 = 0;
  logic [15:0] srch_win, srch_l1, srch_l2, srch_res_offset = 0, slew_chips, rx_power = 16'h0BAD;
  logic [31:0] srch_t1, srch_t2, srch_res_energy = 0, chip_time = 0;
  logic [NF-1:0] finger_en, slew_req, f_lock = 3'b010;
  logic [NF-1:0][5:0] walsh_idx;
  logic [NF-1:0][23:0] f_energy = '0;
  logic track_en, pdm_en, lc_load, frame_strobe = 0, pc_valid = 0, pc_bit = 0, pcg_strobe = 0;
  logic [23:0] track_thr, lock_thr;
  logic [3:0] soft_shift; logic [7:0] pc_step, deskew_err = 0, di_overflow = 0;
  logic [15:0] frame_cnt = 0;
  logic tx_frame_strobe = 0, tx_frame_sent = 0, dec_valid = 0, dec_bit = 0, dec_done = 0, dec_quality = 0;
  logic [8:0] dec_ser = 0;
  logic sleep_req, asleep = 0, wake = 0; logic [15:0] sleep_chips;
  int checks = 0, failures = 0;
  up_interface dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); bus_cs = 1; bus_wr = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_cs = 0; bus_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); bus_cs = 1; bus_wr = 0; bus_addr = a; #1 d = bus_rdata;
    @(negedge clk); bus_cs = 0;
  endtask

  logic [15:0] v, words [$];
  bit slew_seen = 0;
  always @(posedge clk) if (rst_n && slew_req == 3'b100 && slew_chips == 16'd77) slew_seen = 1;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // control and parameters
    wr(8'h00, 16'b0101_1011);
    check(tx_enable && iq_sel && !track_en && pdm_en && finger_en == 3'b101, "CTRL fields");
    rd(8'h00, v); check(v == 16'b0101_1011, "CTRL readback");
    wr(8'h04, 16'hBEEF); wr(8'h05, 16'h1234); wr(8'h06, 16'h03A5);
    check(lc_mask == {10'h3A5, 16'h1234, 16'hBEEF}, "long code mask");
    wr(8'h0B, 16'd300); check(srch_t1 == 32'd300 * 256, "T1 scaling");
    wr(8'h14, 16'd9); check(track_thr == 24'd9 * 256, "track threshold scaling");
    rd(8'h1C, v); check(v == 16'h0BAD, "power readout");
    rd(8'h03, v); check(v[12] && v[3:0] == 4'd8, "status: lock and 8 free words");
    // transmit FIFO until full
    for (int i = 0; i < 8; i++) begin
      logic [15:0] w; w = 16'($urandom()); words.push_back(w); wr(8'h01, w);
    end
    rd(8'h03, v); check(v[3:0] == 4'd0, "FIFO full");
    wr(8'h01, 16'hFFFF);                  // refused
    for (int i = 0; i < 8; i++) begin
      logic [15:0] got;
      for (int b = 0; b < 16; b++) begin
        @(negedge clk); got = {got[14:0], tx_bit};
        if (!tx_bit_valid) begin failures++; $display("FAIL no bit"); end
        tx_bit_ready = 1; @(negedge clk); tx_bit_ready = 0;
      end
      check(got == words[i], $sformatf("TX word %0d: %h exp %h", i, got, words[i]));
    end
    #1 check(!tx_bit_valid, "FIFO empty, the refused word was dropped");
    // decoded bits: 20 bits then end of frame
    words.delete();
    begin
      logic [19:0] bits; bits = 20'($urandom());
      for (int b = 19; b >= 0; b--) begin
        @(negedge clk); dec_valid = 1; dec_bit = bits[b]; @(negedge clk); dec_valid = 0;
      end
      dec_ser = 9'd5; dec_quality = 1; dec_done = 1; @(negedge clk); dec_done = 0;
      @(negedge clk);
      rd(8'h03, v); check(v[9:5] == 5'd2 && v[10], "two words and quality");
      rd(8'h20, v); check(v == bits[19:4], "first decoded word");
      rd(8'h20, v); check(v == {bits[3:0], 12'd0}, "partial word left aligned");
      rd(8'h21, v); check(v == 16'd5, "symbol errors");
    end
    // searcher result held until flags read
    @(negedge clk); srch_res_valid = 1; srch_res_offset = 16'd33; srch_res_energy = 32'h0001_2345; srch_res_pass = 1;
    @(negedge clk); srch_res_offset = 16'd34; @(negedge clk); srch_res_valid = 0;
    rd(8'h10, v); check(v == 16'd33, "first result kept");
    rd(8'h11, v); check(v == 16'h2345, "energy low");
    rd(8'h13, v); check(v[1:0] == 2'b11, "flags valid+pass");
    rd(8'h13, v); check(v[0] == 1'b0, "valid cleared by read");
    // interrupts
    @(negedge clk); srch_done = 1; @(negedge clk); srch_done = 0;
    #1 check(!irq, "masked");
    wr(8'h1D, 16'h0002); #1 check(irq, "unmasked search-done interrupt");
    wr(8'h1E, 16'h0002); #1 check(!irq, "cleared");
    // slew of finger 2
    wr(8'h2E, 16'd77); @(negedge clk); check(slew_seen, "finger 2 slew pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
