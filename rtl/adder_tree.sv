// Pipelined adder tree.
//
// Sums LEAVES unsigned IW-bit inputs in a balanced binary tree with one
// register per level, so the sum of one input set appears clog2(LEAVES)
// cycles after it is presented, and a new set can be presented every cycle.
// The dot-product engine uses it to add up the results of its pipelines.
// The document says only that the pipeline results are accumulated in an
// adder tree whose extra adders add latency; the balanced, fully registered
// tree and the zero padding of a leaf count that is not a power of two are
// this design's choices. Each level widens the data by one bit, so the sum
// never overflows. rst (active high, synchronous) clears the valid bits.
module adder_tree #(
  parameter int unsigned IW     = 3,
  parameter int unsigned LEAVES = 4,
  localparam int unsigned LV    = (LEAVES > 1) ? $clog2(LEAVES) : 0,
  localparam int unsigned OW    = IW + LV
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [IW-1:0] in [LEAVES],
  output logic          out_valid,
  output logic [OW-1:0] sum
);

  localparam int unsigned PAD = 1 << LV;

  // Level l holds PAD >> l partial sums of width IW + l.
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic [IW+l-1:0] s [PAD >> l];
    logic            v;
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < PAD; i++) begin : g_in
        if (i < LEAVES) begin : g_used
          assign s[i] = in[i];
        end else begin : g_zero
          assign s[i] = '0;
        end
      end
      assign v = in_valid;
    end else begin : g_add
      always_ff @(posedge clk) begin
        for (int i = 0; i < (PAD >> l); i++)
          s[i] <= {1'b0, g_lvl[l-1].s[2*i]} + {1'b0, g_lvl[l-1].s[2*i+1]};
      end
      always_ff @(posedge clk) begin
        if (rst) v <= 1'b0;
        else     v <= g_lvl[l-1].v;
      end
    end
  end

  assign sum       = g_lvl[LV].s[0];
  assign out_valid = g_lvl[LV].v;

endmodule
