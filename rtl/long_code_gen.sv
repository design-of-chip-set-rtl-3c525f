// long_code_gen: 42-stage long PN code generator. The register runs the 42nd-degree
// recurrence given by TAPS; the output chip is the modulo-2 inner product of the
// register with a 42-bit long code mask, so that each mobile station (one of its two
// masks, chosen by the microcontroller) gets its own code phase. step advances one
// chip; load writes a new state (system time alignment). The output is combinational
// from the register and the mask.
module long_code_gen #(
  parameter int N = 42,
  parameter logic [N-1:0] TAPS = cdma_pkg::LC_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         load,
  input  logic [N-1:0] load_state,
  input  logic [N-1:0] mask,
  output logic         lc,
  output logic [N-1:0] state
);
  logic nxt;
  always_comb begin
    nxt = 1'b0;
    for (int k = 1; k <= N; k++) if (TAPS[k-1]) nxt ^= state[k-1];
  end
  assign lc = ^(state & mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= {{(N-1){1'b0}}, 1'b1};
    else if (load) state <= (load_state == '0) ? {{(N-1){1'b0}}, 1'b1} : load_state;
    else if (step) state <= {state[N-2:0], nxt};
  end
endmodule
