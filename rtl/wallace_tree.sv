// wallace_tree: carry-save reduction of NUM_OPS operands to two.
//
// Each layer splits its operands into groups of three, in order, and replaces every
// group by the sum and carry words of a csa_3_2; the one or two operands left over
// pass to the next layer unchanged. A layer thus turns n operands into
// 2*floor(n/3) + n mod 3, a reduction by about 1.5, and the tree has
// mult_pkg::csa_stages(NUM_OPS) layers, about log1.5(NUM_OPS/2). The two words at
// the end add up to the sum of all operands modulo 2^W.
//
// The layering follows the classic Wallace scheme of three operands in, two out per
// adder; grouping consecutive operands is this implementation's choice.
// Purely combinational: the delay is one full adder per layer.
module wallace_tree
  import mult_pkg::*;
#(
  parameter int W       = 24,  // operand width
  parameter int NUM_OPS = 8    // operands to add (8 rows remain in the 12x12 multiplier)
) (
  input  logic [W-1:0] ops [NUM_OPS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int S = csa_stages(NUM_OPS);

  // Each layer has its own operand arrays: din holds the operands entering layer s,
  // dout those leaving it; entries beyond the live count are zero.
  for (genvar s = 0; s < S; s++) begin : g_layer
    localparam int NI = csa_ops_after(NUM_OPS, s);  // operands in
    localparam int T  = NI / 3;                     // adders in this layer
    localparam int L  = NI % 3;                     // operands passed on
    logic [W-1:0] din  [NUM_OPS];
    logic [W-1:0] dout [NUM_OPS];
    if (s == 0) begin : g_first
      assign din = ops;
    end else begin : g_next
      assign din = g_layer[s-1].dout;
    end
    for (genvar t = 0; t < T; t++) begin : g_csa
      csa_3_2 #(.W(W)) u_csa (
        .x(din[3*t]), .y(din[3*t+1]), .z(din[3*t+2]),
        .s(dout[2*t]), .c(dout[2*t+1])
      );
    end
    for (genvar j = 0; j < L; j++) begin : g_pass
      assign dout[2*T+j] = din[3*T+j];
    end
    for (genvar k = 2*T + L; k < NUM_OPS; k++) begin : g_zero
      assign dout[k] = '0;
    end
  end

  if (S == 0) begin : g_no_layer
    assign sum   = ops[0];
    if (NUM_OPS > 1) begin : g_two
      assign carry = ops[NUM_OPS-1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_layer[S-1].dout[0];
    assign carry = g_layer[S-1].dout[1];
  end

endmodule
