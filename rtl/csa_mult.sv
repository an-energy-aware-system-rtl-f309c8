// csa_mult: unsigned multiplier built from carry-save adders.
//
// The partial products a & b[i] are folded one by one into a redundant
// (sum, carry) pair with rows of 3:2 full adders, so no carry ripples until
// the end; a single carry-propagate adder then merges sum and carry into the
// product. This keeps the multiplication in plain logic instead of DSP blocks,
// as the published architecture asks of its processing part. That design gives the
// multiplier's width (32 bits unsigned) and that it is carry-save based; the
// array organisation below is this design's own.
//
// Purely combinational: p = a * b in the same cycle.
module csa_mult #(
  parameter int unsigned WA = 32,
  parameter int unsigned WB = 32
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);

  localparam int unsigned WP = WA + WB;

  logic [WB:0][WP-1:0] s_row;   // running carry-save sum
  logic [WB:0][WP-1:0] c_row;   // running carry-save carry (already weighted)

  assign s_row[0] = '0;
  assign c_row[0] = '0;

  for (genvar i = 0; i < WB; i++) begin : g_row
    logic [WP-1:0] pp;
    assign pp = b[i] ? (WP'(a) << i) : '0;
    // one row of full adders: 3 inputs -> sum and shifted carry
    assign s_row[i+1] = s_row[i] ^ c_row[i] ^ pp;
    assign c_row[i+1] = ((s_row[i] & c_row[i]) | (s_row[i] & pp) | (c_row[i] & pp)) << 1;
  end

  // final carry-propagate addition
  assign p = s_row[WB] + c_row[WB];

endmodule
