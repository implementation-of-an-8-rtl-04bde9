// layer_def_rom: read-only table of the layer definitions.
//
// For layer index idx it returns, one cycle later, the layer's channel
// counts, map size, kernel size, stride and the three fractional lengths,
// together with the derived control data: the feature-map cache the layer
// reads, the channel offset of its output (the expand3x3 branch of a fire
// module writes after its expand1x1 sibling, which concatenates the two)
// and the first weight row and bias entry of the layer.  The contents are
// computed at elaboration from the network table in cnn_pkg.
module layer_def_rom
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic [4:0] idx,
  output layer_def_t def
);

  localparam layer_def_t ROM [N_LAYERS] = '{
    layer_def(0),  layer_def(1),  layer_def(2),  layer_def(3),  layer_def(4),
    layer_def(5),  layer_def(6),  layer_def(7),  layer_def(8),  layer_def(9),
    layer_def(10), layer_def(11), layer_def(12), layer_def(13), layer_def(14),
    layer_def(15), layer_def(16), layer_def(17), layer_def(18), layer_def(19),
    layer_def(20), layer_def(21), layer_def(22), layer_def(23), layer_def(24),
    layer_def(25)
  };

  always_ff @(posedge clk) begin
    def <= (idx < 5'(N_LAYERS)) ? ROM[idx] : '0;
  end

endmodule
