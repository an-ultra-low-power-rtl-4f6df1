// fp_adder_tree: balanced tree of binary32 adders summing N words.
//
// Level 0 holds the N inputs. Each following level adds neighbouring pairs
// of the level before (words 2j and 2j+1); an odd word left at the end of a
// level passes through unchanged. The last level holds one word, the sum.
// For N = 55 the levels are 55, 28, 14, 7, 4, 2, 1 words wide: 54 adders and
// a depth of 6 adders. The document accumulates the kernel terms with an
// adder tree; the pairing order is this design's choice (floating-point
// addition is not associative, so another order can differ in the last bits).
//
// Every level has its own array, so no signal feeds back into itself.
//
// Purely combinational.
module fp_adder_tree #(
  parameter int unsigned N = 55
) (
  input  logic [31:0] din [N],
  output logic [31:0] sum
);

  // Number of words at level l.
  function automatic int unsigned width_at(input int unsigned l);
    int unsigned w;
    w = N;
    for (int unsigned k = 0; k < l; k++) w = (w + 1) / 2;
    return w;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned w, l;
    w = N;
    l = 0;
    while (w > 1) begin
      w = (w + 1) / 2;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W = width_at(l);
    logic [31:0] node [W];

    if (l == 0) begin : g_in
      for (genvar i = 0; i < W; i++) begin : g_w
        assign node[i] = din[i];
      end
    end else begin : g_add
      localparam int unsigned WP = width_at(l - 1);
      for (genvar i = 0; i < W; i++) begin : g_w
        if (2 * i + 1 < WP) begin : g_pair
          fp_addsub u_add (
            .a  (g_lvl[l-1].node[2*i]),
            .b  (g_lvl[l-1].node[2*i+1]),
            .sub(1'b0),
            .y  (node[i])
          );
        end else begin : g_pass
          assign node[i] = g_lvl[l-1].node[2*i];
        end
      end
    end
  end

  assign sum = g_lvl[LEVELS].node[0];

endmodule
