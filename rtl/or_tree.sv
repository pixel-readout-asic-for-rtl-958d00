// or_tree: global OR of all pixels' hit signals.
//
// The N inputs are combined by a balanced tree of two-input OR gates, built by
// levels: each level halves the number of signals, so the delay from any
// pixel to the output is ceil(log2 N) gates and the same for every pixel, which
// keeps the timing skew seen by the external TDC small. The output drives the
// TDC pad and is fed back to all pixels as the gate that blocks double hits.
// Purely combinational. Following the chip: one OR of all pixels; the balanced
// tree shape is this design's reading of "OR tree".
module or_tree #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] in,
  output logic         out
);

  // Heap-ordered tree: node k has children 2k and 2k+1, leaves sit at P..2P-1
  // (inputs first, unused leaves tied low), node 1 is the root.
  localparam int unsigned P = (N > 1) ? (1 << $clog2(N)) : 1;

  logic [2*P-1:1] node;

  for (genvar k = 0; k < P; k++) begin : g_leaf
    if (k < N) begin : g_in
      assign node[P+k] = in[k];
    end else begin : g_pad
      assign node[P+k] = 1'b0;
    end
  end

  for (genvar k = 1; k < P; k++) begin : g_node
    assign node[k] = node[2*k] | node[2*k+1];
  end

  assign out = node[1];

endmodule
