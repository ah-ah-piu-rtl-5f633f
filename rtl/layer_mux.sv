// layer_mux: picks the colour index shown at the current pixel.
//
// The picture is built from four layers. Sprite slots are ordered by
// priority: slots of layer 3 (boss, firework, ammo icons) first, then layer 2
// (bullet, player, lives), then layer 1 (enemies, ammo box); layer 0 is the
// SRAM background (scene, menus, score). The first slot that is opaque wins,
// otherwise the background index is used. Outside the active area the index
// is forced to 215 (black). Purely combinational.
module layer_mux
  import ahp_pkg::*;
#(
  parameter int unsigned N = NSPRITES
) (
  input  logic             active,
  input  logic [N-1:0]     opaque,
  input  logic [N-1:0][7:0] index,
  input  logic [7:0]       bg_index,
  output logic [7:0]       pixel,
  output logic             from_sprite
);
  always_comb begin
    pixel       = bg_index;
    from_sprite = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (opaque[i]) begin
        pixel       = index[i];
        from_sprite = 1'b1;
      end
    end
    if (!active) begin
      pixel       = 8'd215;
      from_sprite = 1'b0;
    end
  end
endmodule
