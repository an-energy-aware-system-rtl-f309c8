// intra_pe: processing element shared by planar and angular prediction.
//
// One PE produces one predicted sample per clock. A multiplexer picks four
// weights, four carry-save multipliers form the weighted samples and an adder
// sums them:
//   planar:   (N-1-x)*L[y] + (x+1)*T[N] + (N-1-y)*T[x] + (y+1)*L[N] + N
//                     shifted right by log2(N)+1
//   angular:  (32-f)*ref_a + f*ref_b + 16, shifted right by 5
// For planar, ref_a = L[y] and ref_b = T[x] (left and above neighbours of the
// sample) and top_n / left_n are the corner samples T[N] and L[N]; for angular
// ref_a / ref_b are the two projected reference samples and f the fraction.
// s1 is the planar result and s2 the angular result of the same sum; pred
// is the one selected by `planar`.
//
// Timing: two register stages, inputs sampled at cycle t give pred at t+2.
// The shared weighting datapath follows the published architecture; the two-stage
// split is this design's choice.
module intra_pe #(
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 planar,     // 1: planar, 0: angular
  input  logic [4:0]           x,          // sample column inside the PU
  input  logic [4:0]           y,          // sample row inside the PU
  input  logic [2:0]           log2n,      // 2..5
  input  logic [4:0]           fact,       // angular fraction iFact
  input  logic [BIT_DEPTH-1:0] ref_a,
  input  logic [BIT_DEPTH-1:0] ref_b,
  input  logic [BIT_DEPTH-1:0] top_n,
  input  logic [BIT_DEPTH-1:0] left_n,
  output logic                 out_valid,
  output logic [BIT_DEPTH-1:0] s1,
  output logic [BIT_DEPTH-1:0] s2,
  output logic [BIT_DEPTH-1:0] pred
);

  localparam int unsigned WW = 6;                  // weights 0..32
  localparam int unsigned WPR = BIT_DEPTH + WW;    // product width
  localparam int unsigned WS = BIT_DEPTH + WW + 2; // sum of four products

  logic [5:0] n;
  logic [WW-1:0] w0, w1, w2, w3;
  logic [BIT_DEPTH-1:0] m0, m1, m2, m3;
  logic [WPR-1:0] p0, p1, p2, p3;

  assign n = 6'd1 << log2n;

  // weight / operand multiplexer
  always_comb begin
    if (planar) begin
      w0 = n - 6'd1 - WW'(x);  m0 = ref_a;   // (N-1-x) * L[y]
      w1 = n - 6'd1 - WW'(y);  m1 = ref_b;   // (N-1-y) * T[x]
      w2 = WW'(x) + 6'd1;      m2 = top_n;   // (x+1)   * T[N]
      w3 = WW'(y) + 6'd1;      m3 = left_n;  // (y+1)   * L[N]
    end else begin
      w0 = 6'd32 - WW'(fact);  m0 = ref_a;
      w1 = WW'(fact);          m1 = ref_b;
      w2 = '0;                 m2 = '0;
      w3 = '0;                 m3 = '0;
    end
  end

  csa_mult #(.WA(BIT_DEPTH), .WB(WW)) u_m0 (.a(m0), .b(w0), .p(p0));
  csa_mult #(.WA(BIT_DEPTH), .WB(WW)) u_m1 (.a(m1), .b(w1), .p(p1));
  csa_mult #(.WA(BIT_DEPTH), .WB(WW)) u_m2 (.a(m2), .b(w2), .p(p2));
  csa_mult #(.WA(BIT_DEPTH), .WB(WW)) u_m3 (.a(m3), .b(w3), .p(p3));

  // stage 1: sum of products
  logic [WS-1:0] sum_q;
  logic          planar_q, valid_q;
  logic [2:0]    log2n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q    <= '0;
      planar_q <= 1'b0;
      valid_q  <= 1'b0;
      log2n_q  <= 3'd2;
    end else begin
      sum_q    <= WS'(p0) + WS'(p1) + WS'(p2) + WS'(p3);
      planar_q <= planar;
      valid_q  <= in_valid;
      log2n_q  <= log2n;
    end
  end

  // stage 2: rounding and shift
  logic [WS-1:0] planar_full, angular_full;
  assign planar_full  = (sum_q + (WS'(1) << log2n_q)) >> (log2n_q + 3'd1);
  assign angular_full = (sum_q + WS'(16)) >> 5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      pred      <= '0;
      out_valid <= 1'b0;
    end else begin
      s1        <= BIT_DEPTH'(planar_full);
      s2        <= BIT_DEPTH'(angular_full);
      pred      <= planar_q ? BIT_DEPTH'(planar_full) : BIT_DEPTH'(angular_full);
      out_valid <= valid_q;
    end
  end

endmodule
