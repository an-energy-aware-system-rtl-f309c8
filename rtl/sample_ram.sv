// sample_ram: simple dual-port block RAM of WIDTH-bit words.
//
// Used twice in the accelerator: as the output memory that receives the
// predicted samples (LANES samples per word, two PU-sized banks) and as the
// buffer that holds the original samples of the PU for the cost evaluation.
// One write port and one read port, each on its own address; the read is
// synchronous, data for rd_addr appears one clock later (block-RAM timing).
// The published architecture stores predictions in block RAM; word width and the second
// use are this design's choice.
module sample_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
