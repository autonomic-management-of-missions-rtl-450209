// Battery level automaton.
//
// Three relevant battery levels, Low, Normal and High, starting in Normal.
// "up" moves Low -> Normal -> High and "down" moves High -> Normal -> Low; the
// output bat is the current level. States, initial state and transitions
// follow the battery model. When up and down arrive together up wins (this
// design's choice). One reaction per rising clock edge.
module battery_model
  import amr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       up,
  input  logic       down,
  output bat_level_e bat
);
  bat_level_e bat_nx;

  always_comb begin
    bat_nx = bat;
    unique case (bat)
      BAT_LOW:    if (up) bat_nx = BAT_NORMAL;
      BAT_NORMAL: if (up) bat_nx = BAT_HIGH; else if (down) bat_nx = BAT_LOW;
      BAT_HIGH:   if (down) bat_nx = BAT_NORMAL;
      default:    bat_nx = BAT_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bat <= BAT_NORMAL;
    else        bat <= bat_nx;
endmodule
