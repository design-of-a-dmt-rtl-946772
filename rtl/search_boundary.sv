// search_boundary: symbol detection and coarse boundary search on CS(i).
//
// While enabled, the block waits for the correlator output to exceed the
// threshold; that announces an incoming DMT symbol. From then on it follows the
// maximum of CS over one symbol period (SYM samples). At the end of that window
// it pulses sb_success and reports max_age, the number of correlator samples
// that have arrived since the maximum (0 if the maximum is the current one).
// The maximum marks the last sample of a symbol body. Threshold detection and
// maximum search are the design's; the window of one symbol period is this
// implementation's choice. Timing: sb_success rises in the cycle after the
// SYM-th correlator sample following the threshold crossing.
module search_boundary #(
  parameter int unsigned CW  = 35,
  parameter int unsigned TW  = 36,
  parameter int unsigned SYM = 8832
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 cs_valid,
  input  logic signed [CW-1:0] cs,
  input  logic [TW-1:0]        threshold,
  output logic                 detected,    // threshold crossed, search running
  output logic                 sb_success,
  output logic [$clog2(SYM)-1:0] max_age
);
  localparam int unsigned AW = $clog2(SYM);

  logic signed [CW-1:0] cs_max;
  logic [AW-1:0]        win_cnt;
  logic                 above;

  // CS is compared as a non-negative magnitude; negative CS never detects.
  assign above = !cs[CW-1] && (64'(unsigned'(cs)) > 64'(threshold));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      detected   <= 1'b0;
      sb_success <= 1'b0;
      cs_max     <= '0;
      win_cnt    <= '0;
      max_age    <= '0;
    end else begin
      sb_success <= 1'b0;
      if (!enable) begin
        detected <= 1'b0;
      end else if (cs_valid) begin
        if (!detected) begin
          if (above) begin
            detected <= 1'b1;
            cs_max   <= cs;
            max_age  <= '0;
            win_cnt  <= AW'(1);
          end
        end else begin
          if (cs > cs_max) begin
            cs_max  <= cs;
            max_age <= '0;
          end else begin
            max_age <= max_age + 1'b1;
          end
          if (win_cnt == AW'(SYM - 1)) begin
            detected   <= 1'b0;
            sb_success <= 1'b1;
          end else begin
            win_cnt <= win_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
