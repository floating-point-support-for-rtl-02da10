// tb_pe_array: self-checking test of the PE array at its default 8x8 size.
//
// The bench models the row buses: a memory per row and bus answers reads at
// the address the array drives, and every write-bus transfer is captured.
// Contexts are presented on ctx_row one per cycle, as the configuration
// memory would, and the array spreads them over the columns with one cycle
// of delay per column (loop pipelining).
//   kernel A (integer): s = a + b from both read buses; p = s + W (a running
//   sum along the row, since the west neighbour's result of the same context
//   is one cycle old); q = N op S2 / S op N2 across rows; y = q * imm on the
//   row's shared multiplier; store y. Checked against a model for every row,
//   column and the write address ctx.addr + column.
//   kernel B (floating point, clusters): FSQRT in pairs 0 and 3, FDIV in
//   pair 1 and FMUL in pair 2 on exactly representable operands, so the
//   stored mantissa and exponent words are compared exactly.
//   kernel C (spatial mapping): each PE gets its own context; a value loaded
//   in column 0 flows east through a different add in every column and is
//   stored by column 7 at the address given, with no column offset.
module tb_pe_array;
  import flora_pkg::*;
  localparam int R = 8, C = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              spatial;
  ctx_t              ctx_row [R];
  ctx_t              ctx_pe  [R][C];
  logic              rd_en   [R][2];
  logic [MEM_AW-1:0] rd_addr [R][2];
  logic [DW-1:0]     rd_data [R][2];
  logic              wr_en   [R];
  logic [MEM_AW-1:0] wr_addr [R];
  logic [DW-1:0]     wr_data [R];
  logic [DW-1:0]     pe_out  [R][C];
  logic              busy_any;

  pe_array dut (.clk, .rst_n, .spatial, .ctx_row, .ctx_pe, .rd_en, .rd_addr, .rd_data,
                .wr_en, .wr_addr, .wr_data, .pe_out, .busy_any);

  logic [DW-1:0] mem  [R][2][64];
  logic [DW-1:0] outm [R][64];
  logic          wrote[R][64];
  int            n_rd = 0, n_wr = 0;

  for (genvar r = 0; r < R; r++) begin : g_bus
    for (genvar b = 0; b < 2; b++) begin : g_b
      assign rd_data[r][b] = rd_en[r][b] ? mem[r][b][rd_addr[r][b]] : '0;
    end
    always @(posedge clk) if (rst_n && wr_en[r]) begin
      outm[r][wr_addr[r]] <= wr_data[r];
      wrote[r][wr_addr[r]] <= 1'b1;
    end
  end
  always @(posedge clk) begin
    for (int r = 0; r < R; r++) begin
      if (wr_en[r]) n_wr++;
      if (rd_en[r][0]) n_rd++;
    end
  end

  task automatic ck(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic ctx_t cx(op_e op, src_e sa, src_e sb, logic st);
    ctx_t c = '0;
    c.op = op; c.sa = sa; c.sb = sb; c.st = st;
    return c;
  endfunction

  // run a kernel: prog[k][r] is the context of row r in step k
  task automatic run(input ctx_t prog [16][R], input int n);
    for (int r = 0; r < R; r++) for (int a = 0; a < 64; a++) wrote[r][a] = 1'b0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      for (int r = 0; r < R; r++) ctx_row[r] = prog[k][r];
    end
    @(negedge clk);
    for (int r = 0; r < R; r++) ctx_row[r] = '0;
    repeat (C + 2) @(negedge clk);
    ck(!busy_any, "array idle after the kernel");
  endtask

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctx_t prog [16][R];
    logic [DW-1:0] s [R][C], p [R][C], q [R][C], y;
    spatial = 1'b0;
    for (int r = 0; r < R; r++) begin
      ctx_row[r] = '0;
      for (int c = 0; c < C; c++) ctx_pe[r][c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------- kernel A
    for (int r = 0; r < R; r++) for (int b = 0; b < 2; b++) for (int a = 0; a < 64; a++)
      mem[r][b][a] = 16'($urandom);
    for (int k = 0; k < 16; k++) for (int r = 0; r < R; r++) prog[k][r] = '0;
    for (int r = 0; r < R; r++) begin
      prog[0][r] = cx(OP_ADD, SRC_BUS0, SRC_BUS1, 1'b0);
      prog[0][r].addr = 6'(4 * r);
      prog[1][r] = cx(OP_ADD, SRC_SELF, SRC_W, 1'b0);
      prog[2][r] = (r % 2 == 0) ? cx(OP_XOR, SRC_N, SRC_S2, 1'b0)
                                : cx(OP_SUB, SRC_S, SRC_N2, 1'b0);
      prog[3][r] = cx(OP_MUL, SRC_SELF, SRC_IMM, 1'b0);
      prog[3][r].imm = 7'(r * 7 + 5);
      prog[5][r] = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 1'b1);
      prog[5][r].addr = 6'(8 + r);
    end
    run(prog, 6);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      s[r][c] = mem[r][0][4*r + c] + mem[r][1][4*r + c];
      p[r][c] = s[r][c] + (c > 0 ? p[r][c-1] : 16'h0);
    end
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      logic [DW-1:0] up1, up2, dn1, dn2;
      up1 = (r >= 1) ? p[r-1][c] : 16'h0;  up2 = (r >= 2) ? p[r-2][c] : 16'h0;
      dn1 = (r + 1 < R) ? p[r+1][c] : 16'h0; dn2 = (r + 2 < R) ? p[r+2][c] : 16'h0;
      q[r][c] = (r % 2 == 0) ? (up1 ^ dn2) : (dn1 - up2);
    end
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      y = 16'(q[r][c] * 16'(r * 7 + 5));
      ck(wrote[r][8 + r + c] && outm[r][8 + r + c] == y,
         $sformatf("kernel A row %0d col %0d: got %h expected %h", r, c, outm[r][8 + r + c], y));
    end

    // ---------------------------------------------------- kernel B
    // operands x = 1.m * 2^e with 4 fraction bits, so x*y, x*x are exact
    begin
      int xm [R][C], ym [R][C], xe [R][C], ye [R][C];
      logic xs [R][C], ys [R][C];
      for (int k = 0; k < 16; k++) for (int r = 0; r < R; r++) prog[k][r] = '0;
      for (int pr = 0; pr < 4; pr++) begin
        int mr, er;
        op_e op;
        mr = (pr % 2 == 0) ? 2 * pr : 2 * pr + 1;
        er = (pr % 2 == 0) ? 2 * pr + 1 : 2 * pr;
        op = (pr == 1) ? OP_FDIV : (pr == 2) ? OP_FMUL : OP_FSQRT;
        for (int c = 0; c < C; c++) begin
          logic [14:0] fa, fb;
          int ea, eb;
          logic sa, sb;
          xm[pr][c] = 16 + ($urandom % 16); ym[pr][c] = 16 + ($urandom % 16);
          xe[pr][c] = 100 + ($urandom % 50); ye[pr][c] = 110 + ($urandom % 30);
          xs[pr][c] = (op == OP_FSQRT) ? 1'b0 : 1'($urandom); ys[pr][c] = 1'($urandom);
          // product x*y as a normalised value
          case (op)
            OP_FSQRT: begin   // a = x*x, b unused
              int prod; prod = xm[pr][c] * xm[pr][c];   // 9..10 bits, scaled 2^8
              ea = 2 * xe[pr][c] - 127 + (prod >= 512 ? 1 : 0);
              fa = (prod >= 512) ? 15'(prod << 6) : 15'(prod << 7);
              sa = 1'b0; fb = '0; eb = 127; sb = 1'b0;
            end
            OP_FDIV: begin    // a = x*y, b = y
              int prod; prod = xm[pr][c] * ym[pr][c];
              ea = xe[pr][c] + ye[pr][c] - 127 + (prod >= 512 ? 1 : 0);
              fa = (prod >= 512) ? 15'(prod << 6) : 15'(prod << 7);
              sa = xs[pr][c] ^ ys[pr][c];
              fb = 15'(ym[pr][c] << 11); eb = ye[pr][c]; sb = ys[pr][c];
            end
            default: begin    // a = x, b = y
              fa = 15'(xm[pr][c] << 11); ea = xe[pr][c]; sa = xs[pr][c];
              fb = 15'(ym[pr][c] << 11); eb = ye[pr][c]; sb = ys[pr][c];
            end
          endcase
          mem[mr][0][c] = {sa, fa};      mem[er][0][c] = {8'h00, 8'(ea)};
          mem[mr][1][c] = {sb, fb};      mem[er][1][c] = {8'h00, 8'(eb)};
        end
        prog[0][mr] = cx(op, SRC_BUS0, SRC_BUS1, 1'b0);
        prog[0][er] = cx(op, SRC_BUS0, SRC_BUS1, 1'b0);
        prog[7][mr] = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 1'b1);
        prog[7][er] = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 1'b1);
        prog[7][mr].addr = 6'd32; prog[7][er].addr = 6'd32;
      end
      run(prog, 8);
      for (int pr = 0; pr < 4; pr++) begin
        int mr, er;
        mr = (pr % 2 == 0) ? 2 * pr : 2 * pr + 1;
        er = (pr % 2 == 0) ? 2 * pr + 1 : 2 * pr;
        for (int c = 0; c < C; c++) begin
          logic [15:0] em, ee;
          if (pr == 2) begin
            int prod; prod = xm[pr][c] * ym[pr][c];
            ee = 16'(xe[pr][c] + ye[pr][c] - 127 + (prod >= 512 ? 1 : 0));
            em = {xs[pr][c] ^ ys[pr][c], (prod >= 512) ? 15'(prod << 6) : 15'(prod << 7)};
          end else begin       // FDIV and FSQRT both give x
            ee = 16'(xe[pr][c]);
            em = {xs[pr][c], 15'(xm[pr][c] << 11)};
          end
          ck(outm[mr][32 + c] == em && outm[er][32 + c] == ee,
             $sformatf("kernel B pair %0d col %0d: got %h/%h expected %h/%h",
                       pr, c, outm[mr][32 + c], outm[er][32 + c], em, ee));
        end
      end
    end
    // ---------------------------------------------------- kernel C (spatial)
    // step 0: column 0 loads x from bus 0 (address 40, no column offset);
    // step k = 1..7: column k adds W + (k + r); step 8: column 7 stores at 48
    spatial = 1'b1;
    for (int r = 0; r < R; r++) wrote[r][48] = 1'b0;
    for (int k = 0; k <= 8; k++) begin
      @(negedge clk);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          ctx_pe[r][c] = '0;
          if (k == 0 && c == 0) begin
            ctx_pe[r][c] = cx(OP_MOV, SRC_BUS0, SRC_ZERO, 1'b0);
            ctx_pe[r][c].addr = 6'd40;
          end else if (k >= 1 && k <= 7 && c == k) begin
            ctx_pe[r][c] = cx(OP_ADD, SRC_W, SRC_IMM, 1'b0);
            ctx_pe[r][c].imm = 7'(k + r);
          end else if (k == 8 && c == 7) begin
            ctx_pe[r][c] = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 1'b1);
            ctx_pe[r][c].addr = 6'd48;
          end
        end
    end
    @(negedge clk);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) ctx_pe[r][c] = '0;
    @(negedge clk);
    for (int r = 0; r < R; r++) begin
      y = mem[r][0][40] + 16'(28 + 7 * r);
      ck(wrote[r][48] && outm[r][48] == y,
         $sformatf("spatial row %0d: got %h expected %h", r, outm[r][48], y));
    end
    spatial = 1'b0;
    ck(n_rd > 0 && n_wr > 0, "bus traffic seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
