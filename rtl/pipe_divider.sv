// pipe_divider: fully pipelined restoring divider (the 1/X divider).
//
// Computes q = floor(num / den) with Q_W quotient bits, one result per clock.
// Stage j (j = Q_W-1 .. 0) decides quotient bit j by comparing the partial
// remainder with den << j and subtracting when it fits. A quotient that does
// not fit in Q_W bits, or den = 0, saturates to all ones. A TAG_W-bit side
// word travels with each operand so the caller gets its context back with the
// result. Channel estimation uses it to form 2**K / |Y|^2 for every tone.
// The design names a divider; the pipelined form is this implementation's
// choice, made so that one tone per clock can be estimated.
// Timing: result for an input of cycle t appears in cycle t+Q_W+1.
module pipe_divider #(
  parameter int unsigned NUM_W = 42,
  parameter int unsigned DEN_W = 30,
  parameter int unsigned Q_W   = 26,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output logic [Q_W-1:0]   q,
  output logic [TAG_W-1:0] tag_out
);
  localparam int unsigned RW = (NUM_W > DEN_W + Q_W) ? NUM_W : DEN_W + Q_W;

  logic             v   [Q_W+1];
  logic             sat [Q_W+1];
  logic [RW-1:0]    rem [Q_W+1];
  logic [DEN_W-1:0] dn  [Q_W+1];
  logic [Q_W-1:0]   qq  [Q_W+1];
  logic [TAG_W-1:0] tg  [Q_W+1];

  // Stage 0: register operands and detect overflow (num >= den * 2**Q_W).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
    end
  end
  always_ff @(posedge clk) begin
    rem[0] <= RW'(num);
    dn[0]  <= den;
    qq[0]  <= '0;
    tg[0]  <= tag_in;
    sat[0] <= (den == '0) || ((RW'(num) >> Q_W) >= RW'(den));
  end

  for (genvar s = 0; s < Q_W; s++) begin : g_stage
    localparam int unsigned J = Q_W - 1 - s;
    logic [RW-1:0] dsh;
    logic          fits;
    assign dsh  = RW'(dn[s]) << J;
    assign fits = rem[s] >= dsh;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[s+1] <= 1'b0;
      else        v[s+1] <= v[s];
    end
    always_ff @(posedge clk) begin
      rem[s+1] <= fits ? rem[s] - dsh : rem[s];
      qq[s+1]  <= qq[s] | (fits ? (Q_W'(1) << J) : '0);
      dn[s+1]  <= dn[s];
      tg[s+1]  <= tg[s];
      sat[s+1] <= sat[s];
    end
  end

  assign out_valid = v[Q_W];
  assign q         = sat[Q_W] ? '1 : qq[Q_W];
  assign tag_out   = tg[Q_W];
endmodule
