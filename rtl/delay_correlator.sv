// delay_correlator: cyclic-prefix correlator for symbol boundary estimation.
//
// The cyclic prefix repeats the last N_CP samples of the symbol body, so the
// product of the received signal with itself delayed by N_FFT samples, summed
// over an N_CP-long window, peaks where the window covers a prefix and its
// copy:  CS = sum_{n=0}^{Ng-1} r(i+n) r(i+n+N).
// Structure (as in the receiver block diagram): an N_FFT delay line, a
// multiplier, and a running sum that adds the newest product and subtracts the
// product leaving the window, taken from an N_CP delay line.
// Timing: a sample accepted in cycle t gives cs/cs_valid in cycle t+2; cs then
// is the sum of the last N_CP products r(j) r(j-N_FFT) up to that sample.
module delay_correlator
  import vdsl_pkg::*;
#(
  parameter int unsigned N  = N_FFT,
  parameter int unsigned NG = N_CP,
  parameter int unsigned SW = SAMPLE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [SW-1:0]  r,
  output logic                  cs_valid,
  output logic signed [2*SW+$clog2(NG):0] cs
);
  localparam int unsigned PW = 2 * SW;
  localparam int unsigned CW = 2 * SW + $clog2(NG) + 1;

  logic signed [SW-1:0] r_dly;
  logic signed [PW-1:0] prod, prod_old;
  logic                 prod_valid;

  delay_line #(.DEPTH(N), .W(SW)) u_dl_fft (
    .clk, .rst_n, .in_valid, .din(r), .dout(r_dly)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod       <= '0;
      prod_valid <= 1'b0;
    end else begin
      prod_valid <= in_valid;
      if (in_valid) prod <= r * r_dly;
    end
  end

  delay_line #(.DEPTH(NG), .W(PW)) u_dl_cp (
    .clk, .rst_n, .in_valid(prod_valid), .din(prod), .dout(prod_old)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs       <= '0;
      cs_valid <= 1'b0;
    end else begin
      cs_valid <= prod_valid;
      if (prod_valid) cs <= cs + CW'(prod) - CW'(prod_old);
    end
  end
endmodule
