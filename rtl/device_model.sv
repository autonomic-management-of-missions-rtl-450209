// Device status automaton (camera, GPS, ...).
//
// Two states, Avail (initial) and Busy: input b takes the device, input a
// releases it; dev is the current status. Follows the device model; one
// reaction per rising clock edge, reset gives Avail.
module device_model
  import amr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a,     // release
  input  logic       b,     // acquire
  output dev_state_e dev
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dev <= DEV_AVAIL;
    else unique case (dev)
      DEV_AVAIL: if (b) dev <= DEV_BUSY;
      DEV_BUSY:  if (a) dev <= DEV_AVAIL;
      default:   dev <= DEV_AVAIL;
    endcase
endmodule
