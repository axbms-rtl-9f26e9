// wallace_tree - Wallace-style carry-save reduction of ROWS addends.
//
// At every level the rows still to be added are taken in groups of three,
// and each group is compressed to two rows by a row of full adders
// (csa_3to2); the one or two rows left over pass to the next level
// unchanged. The row count thus falls as n -> 2*floor(n/3) + n mod 3
// until two rows remain, which a carry-propagate adder sums (on an FPGA
// this is the dedicated carry chain). For the 8x8 Booth multiplier the
// five rows of its dot matrix take three levels (5 -> 4 -> 3 -> 2).
//
// Interface: rows[ROWS] of W bits in, sum out, equal to the sum of all rows
// modulo 2^W. Purely combinational. The document prescribes a Wallace tree
// with 3-2 compression but not its exact grouping; grouping rows in order
// and dropping carries beyond bit W-1 is this design's own choice.
module wallace_tree #(
  parameter int unsigned W    = 16,  // row and result width
  parameter int unsigned ROWS = 5    // number of addend rows, at least 2
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum
);

  // Rows remaining after one level of 3:2 compression.
  function automatic int unsigned next_rows(input int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  // Rows present at the input of level l.
  function automatic int unsigned rows_at(input int unsigned l);
    int unsigned n = ROWS;
    for (int unsigned k = 0; k < l; k++) n = next_rows(n);
    return n;
  endfunction

  // Number of levels needed to get down to two rows.
  function automatic int unsigned num_levels();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels();

  if (ROWS < 2) begin : g_bad_rows
    $error("wallace_tree: ROWS must be at least 2");
  end

  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    localparam int unsigned R = rows_at(l);
    localparam int unsigned G = R / 3;          // 3:2 compressors this level
    localparam int unsigned RN = next_rows(R);  // rows handed on

    logic [W-1:0] cur [ROWS];
    logic [W-1:0] nxt [ROWS];

    if (l == 0) begin : g_in
      assign cur = rows;
    end else begin : g_in
      assign cur = g_lev[l-1].nxt;
    end

    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .x(cur[3*g]),
        .y(cur[3*g+1]),
        .z(cur[3*g+2]),
        .s(nxt[2*g]),
        .c(nxt[2*g+1])
      );
    end

    for (genvar r = 3 * G; r < R; r++) begin : g_pass
      assign nxt[2*G + r - 3*G] = cur[r];
    end

    for (genvar r = RN; r < ROWS; r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  if (NLEV == 0) begin : g_cpa
    assign sum = rows[0] + rows[1];
  end else begin : g_cpa
    assign sum = g_lev[NLEV-1].nxt[0] + g_lev[NLEV-1].nxt[1];
  end

endmodule
