// param_scan_chain: serially loaded receiver parameters.
//
// The receiver's tunable parameters (detection threshold, secondary pilot,
// loop gains, LMS step, channel-estimate averaging, adaptation enable) sit in
// one shift register of PARAMS_W bits. While scan is high, each clock shifts
// scan_in in at the least significant end and the most significant bit leaves
// on scan_out, so a host shifts in the new word most significant bit first.
// While scan is low the register holds and drives params. Reset loads the
// defaults. The scan_in / scan / scan_out pins follow the design; the content
// and order of the word are this implementation's choice (rx_params_t).
module param_scan_chain
  import vdsl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan,
  input  logic       scan_in,
  output logic       scan_out,
  output rx_params_t params
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    params <= PARAMS_DEFAULT;
    else if (scan) params <= rx_params_t'({params[PARAMS_W-2:0], scan_in});
  end

  assign scan_out = params[PARAMS_W-1];
endmodule
