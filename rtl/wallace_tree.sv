// wallace_tree: reduces a partial-product bit matrix to two rows whose sum
// (modulo 2^W) equals the sum of all the matrix rows.
//
// Only the bits marked in MASK exist; the rest of pp is ignored. The bits of
// each column are stacked, and reduction layers are added for as long as
// some column holds three or more bits. In each layer every column is cut
// into groups, taken from the bottom of the stack:
//   - four bits go to a 4:2 compressor (nbit_adder_cell) whose cin is the
//     cout of the compressor at the same place in the column to the right,
//   - three bits left over go to a full adder,
//   - two bits left over go to a half adder,
//   - a single bit left over passes to the next layer unchanged.
// A sum stays in its column; carries (and couts that no compressor in the
// next column absorbs) move to the next column of the next layer. Outputs of
// column W-1 that would move further are dropped, which is the modulo 2^W.
// The column heights, the number of layers and every cell's wiring are
// worked out at elaboration by the constant functions below, so the
// generated netlist holds exactly the cells the matrix needs.
// Combinational; the depth is the number of layers (see NUM_LAYERS).
// The full adder, half adder and pass-through rules and the stop at two rows
// are those of the Wallace method the design is built on. Taking groups of
// four through the four-input cell as a 4:2 compressor, and the way cin and
// cout are linked, are choices made here.
module wallace_tree #(
  parameter int unsigned W = 8,
  parameter int unsigned ROWS = 3,
  parameter logic [ROWS-1:0][W-1:0] MASK = '1
) (
  input  logic [ROWS-1:0][W-1:0] pp,
  output logic [W-1:0]           row_a,
  output logic [W-1:0]           row_b
);
  localparam int MAX_LAYERS = 64;

  // How a column of height h is split into cells in one layer.
  function automatic int n4_of(int h);    return h / 4;                  endfunction
  function automatic int n3_of(int h);    return (h % 4 == 3) ? 1 : 0;   endfunction
  function automatic int nha_of(int h);   return (h % 4 == 2) ? 1 : 0;   endfunction
  function automatic int npass_of(int h); return (h % 4 == 1) ? 1 : 0;   endfunction
  // Outputs of a column's own cells that stay in the column.
  function automatic int own_of(int h);
    return n4_of(h) + n3_of(h) + nha_of(h) + npass_of(h);
  endfunction
  function automatic int imax(int a, int b); return (a > b) ? a : b; endfunction

  // Height of column c after `layer` reduction layers.
  function automatic int col_height(int layer, int c);
    int h  [W];
    int hn [W];
    for (int k = 0; k < W; k++) begin
      h[k] = 0;
      for (int r = 0; r < ROWS; r++) h[k] += int'(MASK[r][k]);
    end
    for (int l = 0; l < layer; l++) begin
      for (int k = 0; k < W; k++) begin
        hn[k] = own_of(h[k]);
        if (k > 0) begin
          hn[k] += n4_of(h[k-1]) + imax(0, n4_of(h[k-1]) - n4_of(h[k]))
                 + n3_of(h[k-1]) + nha_of(h[k-1]);
        end
      end
      for (int k = 0; k < W; k++) h[k] = hn[k];
    end
    return h[c];
  endfunction

  function automatic int max_height(int layer);
    int m = 0;
    for (int c = 0; c < W; c++) m = imax(m, col_height(layer, c));
    return m;
  endfunction

  function automatic int count_layers();
    int l = 0;
    while (max_height(l) > 2 && l < MAX_LAYERS) l++;
    return l;
  endfunction

  function automatic int peak_height(int layers);
    int m = 2;
    for (int l = 0; l <= layers; l++) m = imax(m, max_height(l));
    return m;
  endfunction

  // Position of row r's bit within the stack of column c at layer 0.
  function automatic int stack_pos(int r, int c);
    int pos = 0;
    for (int k = 0; k < r; k++) pos += int'(MASK[k][c]);
    return pos;
  endfunction

  localparam int NUM_LAYERS = count_layers();
  localparam int MAXH = peak_height(NUM_LAYERS);

  // stack0[c][k]: k-th bit of column c entering the first layer. Each layer
  // then has its own nets: g_layer[l].g_col[c].ib holds the bits entering
  // column c of layer l, g_layer[l].nb[c] those leaving it, and
  // g_layer[l].g_col[c].co the couts of the column's compressors.
  wire [MAXH-1:0] stack0 [W];

  // Layer 0: stack the existing matrix bits of each column.
  for (genvar c = 0; c < W; c++) begin : g_fill
    localparam int H0 = col_height(0, c);
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      if (MASK[r][c]) begin : g_bit
        assign stack0[c][stack_pos(r, c)] = pp[r][c];
      end
    end
    for (genvar k = H0; k < MAXH; k++) begin : g_zero
      assign stack0[c][k] = 1'b0;
    end
  end

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    wire [MAXH-1:0] nb [W];

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H   = col_height(l, c);
      localparam int HP  = (c > 0) ? col_height(l, c - 1) : 0;
      localparam int HN  = (c < W - 1) ? col_height(l, c + 1) : 0;
      localparam int N4  = n4_of(H);
      localparam int N3  = n3_of(H);
      localparam int NHA = nha_of(H);
      localparam int NPS = npass_of(H);
      localparam int N4P = n4_of(HP);
      localparam int N4N = n4_of(HN);
      // Where this column's next-layer stack places each kind of bit.
      localparam int O_S3  = N4;
      localparam int O_HA  = O_S3 + N3;
      localparam int O_PS  = O_HA + NHA;
      localparam int O_C4  = O_PS + NPS;
      localparam int O_CO  = O_C4 + N4P;
      localparam int O_C3  = O_CO + imax(0, N4P - N4);
      localparam int O_CHA = O_C3 + n3_of(HP);
      localparam int HNEXT = O_CHA + nha_of(HP);
      // Where the next column's stack places the carries sent from here.
      localparam int X_C4  = own_of(HN);
      localparam int X_C3  = X_C4 + N4 + imax(0, N4 - N4N);
      localparam int X_CHA = X_C3 + N3;

      wire [MAXH-1:0] ib;
      wire [MAXH-1:0] co;

      if (l == 0) begin : g_in0
        assign ib = stack0[c];
      end else begin : g_in
        assign ib = g_layer[l-1].nb[c];
      end

      for (genvar j = 0; j < N4; j++) begin : g_c42
        logic cin, cy;
        if (j < N4P) begin : g_cin
          assign cin = g_col[c-1].co[j];
        end else begin : g_nocin
          assign cin = 1'b0;
        end
        nbit_adder_cell u_c42 (
          .a    (ib[4*j]),
          .b    (ib[4*j+1]),
          .c    (ib[4*j+2]),
          .d    (ib[4*j+3]),
          .cin  (cin),
          .sum  (nb[c][j]),
          .carry(cy),
          .cout (co[j])
        );
        if (c < W - 1) begin : g_up
          assign nb[c+1][X_C4 + j] = cy;
        end
      end
      for (genvar j = N4; j < MAXH; j++) begin : g_noco
        assign co[j] = 1'b0;
      end
      // couts of the column to the right that no compressor here absorbs
      for (genvar j = N4; j < N4P; j++) begin : g_cofwd
        assign nb[c][O_CO + j - N4] = g_col[c-1].co[j];
      end

      if (N3 != 0) begin : g_fa
        logic cy;
        full_adder u_fa (
          .a    (ib[4*N4]),
          .b    (ib[4*N4+1]),
          .c    (ib[4*N4+2]),
          .sum  (nb[c][O_S3]),
          .carry(cy)
        );
        if (c < W - 1) begin : g_up
          assign nb[c+1][X_C3] = cy;
        end
      end
      if (NHA != 0) begin : g_ha
        logic cy;
        half_adder u_ha (
          .a    (ib[4*N4]),
          .b    (ib[4*N4+1]),
          .sum  (nb[c][O_HA]),
          .carry(cy)
        );
        if (c < W - 1) begin : g_up
          assign nb[c+1][X_CHA] = cy;
        end
      end
      if (NPS != 0) begin : g_pass
        assign nb[c][O_PS] = ib[4*N4];
      end
      for (genvar k = HNEXT; k < MAXH; k++) begin : g_zero
        assign nb[c][k] = 1'b0;
      end
    end
  end

  // At most two bits are left in every column.
  for (genvar c = 0; c < W; c++) begin : g_out
    localparam int HF = col_height(NUM_LAYERS, c);
    wire [MAXH-1:0] fin;
    if (NUM_LAYERS == 0) begin : g_none
      assign fin = stack0[c];
    end else begin : g_last
      assign fin = g_layer[NUM_LAYERS-1].nb[c];
    end
    if (HF >= 1) begin : g_a
      assign row_a[c] = fin[0];
    end else begin : g_a0
      assign row_a[c] = 1'b0;
    end
    if (HF >= 2) begin : g_b
      assign row_b[c] = fin[1];
    end else begin : g_b0
      assign row_b[c] = 1'b0;
    end
  end
endmodule
