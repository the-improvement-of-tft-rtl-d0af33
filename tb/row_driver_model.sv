// row_driver_model: behavioural gate driver for simulation only. STV is
// shifted into an N-stage shift register on each rising edge of CKV; gate k
// is on while stage k holds the token and OE is low. n_on reports how many
// gates are on at once and cur_gate the index (1-based) of the last one on.
`timescale 1ns/1ps
module row_driver_model #(
  parameter int N = 8
) (
  input  logic stv,
  input  logic ckv,
  input  logic oe,
  output int   n_on,
  output int   cur_gate
);

  logic [N:1] sr = '0;

  always @(posedge ckv) sr <= {sr[N-1:1], stv};

  always_comb begin
    n_on = 0;
    cur_gate = 0;
    for (int k = 1; k <= N; k++)
      if (sr[k] && !oe) begin
        n_on++;
        cur_gate = k;
      end
  end

endmodule
