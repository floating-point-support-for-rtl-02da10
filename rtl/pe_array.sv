// pe_array: the ROWS x COLS array of PEs with its interconnect and the shared
// functional units of each row.
//
// PEs of vertically adjacent rows 2k and 2k+1 in one column form an FPU-PE
// cluster; the mantissa PE is on top in row pairs 0 and 2 and at the bottom in
// pairs 1 and 3 (rows 0, 3, 4, 7 hold mantissa PEs), the arrangement of the
// document's Fig. 3.5(a). Each PE reads its four mesh neighbours and the PEs
// two hops away in each direction; links at the array edge read zero.
//
// Temporal mapping with loop pipelining (spatial = 0): the array receives one
// context word per row per cycle (`ctx_row`), which column 0 executes at once;
// each further column receives the same word one cycle later than its left
// neighbour, so column c runs loop iteration c. A bus access of a context in
// column c uses data-memory address ctx.addr + c.
// Spatial mapping (spatial = 1): every PE executes its own word of `ctx_pe`
// in the cycle it arrives, and bus addresses are used as given, so a dataflow
// graph can be laid out over the array with data streaming through it.
//
// Row resources: every row has a pipelined multiplier; the rows flagged in
// DIV_ROWS have a divider and those in SQRT_ROWS a square-root unit (rows 1,
// 4, 5, 8 and rows 1, 8 counting from one in the fabricated 8x8 array). The
// PEs of a row share them and the row's two read buses and one write bus; the
// configuration must schedule at most one user per unit and bus per cycle,
// which assertions check. Requests are ORed together and results broadcast.
module pe_array
  import flora_pkg::*;
#(
  parameter int unsigned  ROWS      = 8,
  parameter int unsigned  COLS      = 8,
  parameter logic [ROWS-1:0] DIV_ROWS  = ROWS'(8'b1001_1001),
  parameter logic [ROWS-1:0] SQRT_ROWS = ROWS'(8'b1000_0001)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              spatial,                // mapping strategy
  input  ctx_t              ctx_row   [ROWS],       // temporal: one word per row
  input  ctx_t              ctx_pe    [ROWS][COLS], // spatial: one word per PE
  // row read buses (two per row) and write bus
  output logic              rd_en     [ROWS][2],
  output logic [MEM_AW-1:0] rd_addr   [ROWS][2],
  input  logic [DW-1:0]     rd_data   [ROWS][2],
  output logic              wr_en     [ROWS],
  output logic [MEM_AW-1:0] wr_addr   [ROWS],
  output logic [DW-1:0]     wr_data   [ROWS],
  output logic [DW-1:0]     pe_out    [ROWS][COLS],
  output logic              busy_any
);
  // ------------------------------------------------------------ contexts
  ctx_t ctx [ROWS][COLS];   // context each PE executes
  ctx_t dly [ROWS][COLS];   // temporal-mapping delay line
  for (genvar r = 0; r < ROWS; r++) begin : g_ctx_r
    assign dly[r][0] = ctx_row[r];
    for (genvar c = 1; c < COLS; c++) begin : g_ctx_c
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) dly[r][c] <= '0;
        else        dly[r][c] <= dly[r][c-1];
      end
    end
    for (genvar c = 0; c < COLS; c++) begin : g_sel
      assign ctx[r][c] = spatial ? ctx_pe[r][c] : dly[r][c];
    end
  end

  // bus address offset: the column number under loop pipelining, none in
  // spatial mapping where each PE's context carries its own address
  function automatic logic [MEM_AW-1:0] col_off(logic sp, int c);
    return sp ? '0 : MEM_AW'(c);
  endfunction

  // ------------------------------------------------------------ PE signals
  logic [DW-1:0]     nbr   [ROWS][COLS][8];
  logic              rd0   [ROWS][COLS], rd1 [ROWS][COLS], st [ROWS][COLS];
  logic [MEM_AW-1:0] addr  [ROWS][COLS];
  logic              busy  [ROWS][COLS], done [ROWS][COLS];
  logic              mreq  [ROWS][COLS];
  logic [DW-1:0]     ma    [ROWS][COLS], mb [ROWS][COLS];
  logic [2*DW-1:0]   mp    [ROWS];
  logic              dreq  [ROWS][COLS], sreq [ROWS][COLS];
  logic [DW-1:0]     da    [ROWS][COLS], db [ROWS][COLS];
  logic [37:0]       srad  [ROWS][COLS];
  logic [18:0]       dq    [ROWS], sroot [ROWS];

  function automatic logic [DW-1:0] at(logic [DW-1:0] o [ROWS][COLS], int r, int c);
    if (r < 0 || r >= int'(ROWS) || c < 0 || c >= int'(COLS)) return '0;
    return o[r][c];
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_nr
    for (genvar c = 0; c < COLS; c++) begin : g_nc
      assign nbr[r][c][0] = at(pe_out, r, c-1);
      assign nbr[r][c][1] = at(pe_out, r, c+1);
      assign nbr[r][c][2] = at(pe_out, r-1, c);
      assign nbr[r][c][3] = at(pe_out, r+1, c);
      assign nbr[r][c][4] = at(pe_out, r, c-2);
      assign nbr[r][c][5] = at(pe_out, r, c+2);
      assign nbr[r][c][6] = at(pe_out, r-2, c);
      assign nbr[r][c][7] = at(pe_out, r+2, c);
    end
  end

  // ------------------------------------------------------------ clusters
  for (genvar k = 0; k < ROWS / 2; k++) begin : g_pair
    localparam int MR = is_mant_row(2*k) ? 2*k : 2*k + 1;
    localparam int ER = is_mant_row(2*k) ? 2*k + 1 : 2*k;
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [15:0] bus_m [2], bus_e [2];
      assign bus_m[0] = rd_data[MR][0];
      assign bus_m[1] = rd_data[MR][1];
      assign bus_e[0] = rd_data[ER][0];
      assign bus_e[1] = rd_data[ER][1];
      fpu_pe_cluster u_cl (
        .clk, .rst_n,
        .ctx_m(ctx[MR][c]), .ctx_e(ctx[ER][c]),
        .nbr_m(nbr[MR][c]), .nbr_e(nbr[ER][c]),
        .bus0_m(bus_m[0]), .bus1_m(bus_m[1]), .bus0_e(bus_e[0]), .bus1_e(bus_e[1]),
        .rd0_m(rd0[MR][c]), .rd1_m(rd1[MR][c]), .st_m(st[MR][c]),
        .rd0_e(rd0[ER][c]), .rd1_e(rd1[ER][c]), .st_e(st[ER][c]),
        .addr_m(addr[MR][c]), .addr_e(addr[ER][c]),
        .out_m(pe_out[MR][c]), .out_e(pe_out[ER][c]),
        .busy_m(busy[MR][c]), .busy_e(busy[ER][c]),
        .done_m(done[MR][c]), .done_e(done[ER][c]),
        .mul_req_m(mreq[MR][c]), .mul_req_e(mreq[ER][c]),
        .mul_a_m(ma[MR][c]), .mul_b_m(mb[MR][c]), .mul_a_e(ma[ER][c]), .mul_b_e(mb[ER][c]),
        .mul_p_m(mp[MR]), .mul_p_e(mp[ER]),
        .div_req(dreq[MR][c]), .div_a(da[MR][c]), .div_b(db[MR][c]), .div_q(dq[MR]),
        .sqrt_req(sreq[MR][c]), .sqrt_rad(srad[MR][c]), .sqrt_root(sroot[MR]));
      // exponent rows issue no divider / square-root requests
      assign dreq[ER][c] = 1'b0;
      assign da[ER][c]   = '0;
      assign db[ER][c]   = '0;
      assign sreq[ER][c] = 1'b0;
      assign srad[ER][c] = '0;
    end
  end

  // ------------------------------------------------------------ row resources
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic              m_req, d_req, s_req, any_rd0, any_rd1, any_st;
    logic [DW-1:0]     m_a, m_b, d_a, d_b, w_d;
    logic [37:0]       s_rad;
    logic [MEM_AW-1:0] a0, a1, aw;
    logic              m_v, d_v, s_v;
    logic [COLS-1:0]   v_m, v_d, v_s, v_r0, v_r1, v_st;

    always_comb begin
      m_req = 1'b0; d_req = 1'b0; s_req = 1'b0;
      any_rd0 = 1'b0; any_rd1 = 1'b0; any_st = 1'b0;
      m_a = '0; m_b = '0; d_a = '0; d_b = '0; s_rad = '0; w_d = '0;
      a0 = '0; a1 = '0; aw = '0;
      for (int c = 0; c < int'(COLS); c++) begin
        v_m[c] = mreq[r][c]; v_d[c] = dreq[r][c]; v_s[c] = sreq[r][c];
        v_r0[c] = rd0[r][c]; v_r1[c] = rd1[r][c]; v_st[c] = st[r][c];
        m_req |= mreq[r][c];
        d_req |= dreq[r][c];
        s_req |= sreq[r][c];
        if (mreq[r][c]) begin m_a |= ma[r][c]; m_b |= mb[r][c]; end
        if (dreq[r][c]) begin d_a |= da[r][c]; d_b |= db[r][c]; end
        if (sreq[r][c]) s_rad |= srad[r][c];
        if (rd0[r][c]) begin any_rd0 = 1'b1; a0 |= addr[r][c] + col_off(spatial, c); end
        if (rd1[r][c]) begin any_rd1 = 1'b1; a1 |= addr[r][c] + col_off(spatial, c); end
        if (st[r][c])  begin any_st  = 1'b1; aw |= addr[r][c] + col_off(spatial, c); w_d |= pe_out[r][c]; end
      end
    end

    assign rd_en[r][0]   = any_rd0;
    assign rd_en[r][1]   = any_rd1;
    assign rd_addr[r][0] = a0;
    assign rd_addr[r][1] = a1;
    assign wr_en[r]      = any_st;
    assign wr_addr[r]    = aw;
    assign wr_data[r]    = w_d;

    shared_mult u_mul (.clk, .rst_n, .req(m_req), .a(m_a), .b(m_b), .p_valid(m_v), .p(mp[r]));

    if (DIV_ROWS[r]) begin : g_div
      shared_div u_div (.clk, .rst_n, .req(d_req), .a(d_a), .b(d_b), .q_valid(d_v), .q(dq[r]));
    end else begin : g_nodiv
      assign dq[r] = '0;
      assign d_v   = 1'b0;
    end
    if (SQRT_ROWS[r]) begin : g_sqrt
      shared_sqrt u_sqrt (.clk, .rst_n, .req(s_req), .rad(s_rad), .root_valid(s_v), .root(sroot[r]));
    end else begin : g_nosqrt
      assign sroot[r] = '0;
      assign s_v      = 1'b0;
    end

    // the configuration schedules shared resources without conflicts
    a_one_mul:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(v_m))
      else $error("row %0d: two multiplier requests in one cycle", r);
    a_one_div:  assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(v_d) && (DIV_ROWS[r] || v_d == '0))
      else $error("row %0d: divider conflict or row has no divider", r);
    a_one_sqrt: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(v_s) && (SQRT_ROWS[r] || v_s == '0))
      else $error("row %0d: square-root conflict or row has no square-root unit", r);
    a_one_bus:  assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(v_r0) && $onehot0(v_r1) && $onehot0(v_st))
      else $error("row %0d: two PEs on one row bus in one cycle", r);
  end

  always_comb begin
    busy_any = 1'b0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++)
        busy_any |= busy[r][c];
  end
endmodule
