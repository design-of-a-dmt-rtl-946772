// seq_divider: bit-serial restoring divider (the I/Q divider).
//
// Computes q = floor(num * 2**FRAC / den) for num <= den, den > 0, so q is the
// ratio num/den in [0, 1] with FRAC fraction bits (FRAC+1 bits in all). One
// quotient bit is produced per clock, most significant first: compare the
// partial remainder with den, subtract if not smaller, shift left. The timing
// error detector uses it to form min(|I|,|Q|)/max(|I|,|Q|) of a pilot tone for
// the arctangent table. The design names the divider; the restoring bit-serial
// form is this implementation's choice, which is ample for two pilots per
// symbol. Timing: start in cycle t, done pulses in cycle t+FRAC+2.
module seq_divider #(
  parameter int unsigned W    = 15,
  parameter int unsigned FRAC = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [W-1:0]    num,
  input  logic [W-1:0]    den,
  output logic            busy,
  output logic            done,
  output logic [FRAC:0]   q
);
  logic [W:0]              rem;
  logic [W-1:0]            den_r;
  logic [$clog2(FRAC+2)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      den_r <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem   <= {1'b0, num};
        den_r <= den;
        q     <= '0;
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (rem >= {1'b0, den_r}) begin
          q   <= {q[FRAC-1:0], 1'b1};
          rem <= (rem - {1'b0, den_r}) << 1;
        end else begin
          q   <= {q[FRAC-1:0], 1'b0};
          rem <= rem << 1;
        end
        if (cnt == ($clog2(FRAC+2))'(FRAC)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
