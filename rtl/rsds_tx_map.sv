// rsds_tx_map: pixel data to RSDS pair bits.
//
// RSDS moves two bits per pair in each clock, one in each half. Colour c uses
// BITS/2 pairs; pair k of a colour carries bit 2k in the first half of the
// clock and bit 2k+1 in the second. For 8-bit data that is four pairs per
// colour (R[0]/R[1] on pair 0 ... R[6]/R[7] on pair 3); the 6-bit mapping used
// with 6-bit drivers applies the same rule with three pairs per colour.
// rise[] and fall[] hold the two halves, pairs ordered R0..Rn, G0..Gn,
// B0..Bn from bit 0; a double-data-rate output cell and the differential
// driver, outside this block, send them. Timing: one register stage.
module rsds_tx_map #(
  parameter int BITS = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [BITS-1:0]       r,
  input  logic [BITS-1:0]       g,
  input  logic [BITS-1:0]       b,
  output logic [3*BITS/2-1:0]   rise,
  output logic [3*BITS/2-1:0]   fall
);

  localparam int NP = BITS / 2;   // pairs per colour

  logic [3*NP-1:0] rise_d, fall_d;

  always_comb begin
    for (int k = 0; k < NP; k++) begin
      rise_d[k]        = r[2*k];
      fall_d[k]        = r[2*k+1];
      rise_d[NP+k]     = g[2*k];
      fall_d[NP+k]     = g[2*k+1];
      rise_d[2*NP+k]   = b[2*k];
      fall_d[2*NP+k]   = b[2*k+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rise <= '0;
      fall <= '0;
    end else begin
      rise <= rise_d;
      fall <= fall_d;
    end
  end

  initial assert (BITS % 2 == 0) else $error("BITS must be even");

endmodule
