// wallace_tree: accurate carry-save reduction of ROWS partial product rows to
// two rows.
//
// Each layer groups its rows in threes and feeds each group to a 3:2 layer of
// full adders (csa_3to2); rows left over (one or two) pass to the next layer
// unchanged. A layer of r rows thus yields 2*floor(r/3) + r mod 3 rows, and
// layers are added until two remain, which is Wallace's schedule applied to
// whole rows. The published scheme uses an accurate Wallace tree followed by a fast
// adder; its bit-level dot diagrams also use half adders in the short
// columns, whereas here every column of a layer uses full adders (constant
// zeros in empty columns are left for synthesis to remove). The sum is exact
// modulo 2^W. Purely combinational. ROWS must be at least 2.
module wallace_tree #(
  parameter int ROWS = 6,   // number of input rows
  parameter int W    = 32   // row width (product width)
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  // rows in layer l
  function automatic int rows_at(int l);
    int r = ROWS;
    for (int i = 0; i < l; i++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int num_layers();
    int r = ROWS;
    int n = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      n++;
    end
    return n;
  endfunction

  localparam int NL = num_layers();

  // Rows of each layer; layer 0 is the input, layer NL holds the two outputs.
  for (genvar l = 0; l <= NL; l++) begin : g_lay
    logic [W-1:0] v [ROWS];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_in
    assign g_lay[0].v[r] = rows[r];
  end

  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam int R    = rows_at(l);
    localparam int G    = R / 3;       // full-adder groups
    localparam int RNXT = rows_at(l + 1);
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .x    (g_lay[l].v[3*g]),
        .y    (g_lay[l].v[3*g+1]),
        .z    (g_lay[l].v[3*g+2]),
        .sum  (g_lay[l+1].v[2*g]),
        .carry(g_lay[l+1].v[2*g+1])
      );
    end
    for (genvar p = 3*G; p < R; p++) begin : g_pass
      assign g_lay[l+1].v[2*G + p - 3*G] = g_lay[l].v[p];
    end
    for (genvar u = RNXT; u < ROWS; u++) begin : g_unused
      assign g_lay[l+1].v[u] = '0;
    end
  end

  assign sum_o   = g_lay[NL].v[0];
  assign carry_o = g_lay[NL].v[1];

  if (ROWS < 2) begin : g_bad_rows
    $error("wallace_tree: ROWS must be at least 2");
  end
endmodule
