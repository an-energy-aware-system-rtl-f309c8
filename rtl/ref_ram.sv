// ref_ram: reference (neighbouring) sample memory of the intra predictor.
//
// All neighbours of the current prediction unit sit in one array of
// 4*NMAX+1 samples. Position CORNER = 2*NMAX holds the top-left corner
// p[-1][-1]; the left column p[-1][y] is stored at CORNER-1-y (so it runs
// bottom-to-top towards the corner) and the above row p[x][-1] at CORNER+1+x.
// Keeping the two halves in one array around the corner lets every
// angular mode walk through contiguous addresses.
//
// The memory holds two such arrays (banks) so the host can load the
// neighbours of the next PU into one bank while the prediction reads the
// other: wr_bank selects the bank written, rd_bank the bank read.
//
// Interface: one write port (one sample per cycle, used by the host while
// loading a PU) and NRD read ports. Reads are synchronous like a block RAM:
// the sample for rd_addr[i] appears on rd_data[i] one clock later. Writes
// and reads to the same address in one cycle return the old value.
// The block-RAM storage and loading while processing follow the published
// architecture; the number of read ports (two per processing element) and
// the two-bank organisation are this design's choice.
module ref_ram #(
  parameter int unsigned NMAX      = 32,
  parameter int unsigned BIT_DEPTH = 8,
  parameter int unsigned NRD       = 8,
  localparam int unsigned DEPTH    = 4 * NMAX + 1,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                            clk,
  input  logic                            wr_en,
  input  logic                            wr_bank,
  input  logic [AW-1:0]                   wr_addr,
  input  logic [BIT_DEPTH-1:0]            wr_data,
  input  logic                            rd_bank,
  input  logic [NRD-1:0][AW-1:0]          rd_addr,
  output logic [NRD-1:0][BIT_DEPTH-1:0]   rd_data
);

  logic [BIT_DEPTH-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_bank][wr_addr] <= wr_data;
  end

  for (genvar i = 0; i < NRD; i++) begin : g_rd
    always_ff @(posedge clk) begin
      if (32'(rd_addr[i]) < DEPTH) rd_data[i] <= mem[rd_bank][rd_addr[i]];
      else                         rd_data[i] <= '0;
    end
  end

endmodule
