// tb_pe: integer behaviour of a single PE.
//
// Drives random single-cycle integer contexts with operands taken from the
// neighbour links, the immediate field, the row buses, the register file and
// the PE's own output, and checks the output register and register-file
// writes against a reference model; checks the two-cycle integer multiply on
// a shared multiplier, the busy flag, and the bus request/store outputs.
module tb_pe;
  import flora_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctx_t ctx;
  logic [DW-1:0] nbr [8];
  logic [DW-1:0] pair_data, bus0, bus1, out_q;
  pair_msg_t pin, pout;
  logic rd0, rd1, st, busy, done, mreq, dreq, sreq, pv;
  logic [MEM_AW-1:0] addr;
  logic [DW-1:0] ma, mb, da, db;
  logic [2*DW-1:0] mp;
  logic [37:0] srad;
  int checks = 0, failures = 0;

  pe #(.IS_MANT(1'b0)) dut (
    .clk, .rst_n, .ctx, .nbr, .pair_data, .pmsg_in(pin), .pmsg_out(pout),
    .bus0, .bus1, .rd0_en(rd0), .rd1_en(rd1), .st_en(st), .mem_addr(addr),
    .out_q, .busy, .done, .mul_req(mreq), .mul_a(ma), .mul_b(mb), .mul_p(mp),
    .div_req(dreq), .div_a(da), .div_b(db), .div_q(19'd0),
    .sqrt_req(sreq), .sqrt_rad(srad), .sqrt_root(19'd0));
  shared_mult u_m (.clk, .rst_n, .req(mreq), .a(ma), .b(mb), .p_valid(pv), .p(mp));

  logic [DW-1:0] rf_m [4];
  logic [DW-1:0] out_m;

  function automatic logic [DW-1:0] srcv(src_e s, ctx_t c);
    case (s)
      SRC_W, SRC_E, SRC_N, SRC_S, SRC_W2, SRC_E2, SRC_N2, SRC_S2: return nbr[int'(s)];
      SRC_PAIR: return pair_data;
      SRC_RF:   return rf_m[c.rf_ra];
      SRC_IMM:  return 16'($signed(c.imm));
      SRC_BUS0: return bus0;
      SRC_BUS1: return bus1;
      SRC_SELF: return out_m;
      default:  return 16'h0;
    endcase
  endfunction

  function automatic logic [DW-1:0] refalu(op_e op, logic [DW-1:0] a, logic [DW-1:0] b);
    logic signed [DW-1:0] sa = a, sb = b;
    case (op)
      OP_MOV: return a;
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_ABS: return (sa < 0) ? 16'(-sa) : a;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SHL: return a << b[3:0];
      OP_SHR: return a >> b[3:0];
      OP_SRA: return 16'(sa >>> b[3:0]);
      OP_MIN: return (sa < sb) ? a : b;
      OP_MAX: return (sa < sb) ? b : a;
      OP_SLT: return (sa < sb) ? 16'd1 : 16'd0;
      default: return out_m;
    endcase
  endfunction

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    op_e ops [13] = '{OP_MOV, OP_ADD, OP_SUB, OP_ABS, OP_AND, OP_OR, OP_XOR,
                      OP_SHL, OP_SHR, OP_SRA, OP_MIN, OP_MAX, OP_SLT};
    logic [DW-1:0] a, b, x;
    ctx_t c;
    ctx = '0; pin = '0; pair_data = 16'h5A5A; bus0 = 0; bus1 = 0;
    for (int i = 0; i < 8; i++) nbr[i] = 16'(i * 1111);
    for (int i = 0; i < 4; i++) rf_m[i] = 0;
    out_m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) nbr[k] = 16'($urandom);
      bus0 = 16'($urandom); bus1 = 16'($urandom); pair_data = 16'($urandom);
      ctx = ctx_t'($urandom);
      ctx.sa = src_e'($urandom % 15); ctx.sb = src_e'($urandom % 15);
      ctx.op = (i % 10 == 9) ? OP_MUL : ops[$urandom % 13];
      a = srcv(ctx.sa, ctx); b = srcv(ctx.sb, ctx);
      c = ctx;
      #1;
      checks++;
      if (rd0 !== (ctx.sa == SRC_BUS0 || ctx.sb == SRC_BUS0) || st !== ctx.st || addr !== ctx.addr) begin
        failures++; $display("FAIL bus request outputs");
      end
      if (ctx.op == OP_MUL) begin
        x = a * b;
        @(negedge clk);
        checks++;
        if (!busy) begin failures++; $display("FAIL busy not set during MUL"); end
        ctx = '0;
        @(negedge clk);
        if (c.rf_we) rf_m[c.rf_wa] = x;
      end else begin
        x = refalu(ctx.op, a, b);
        @(negedge clk);
        ctx = '0;
      end
      checks++;
      if (out_q !== x || busy) begin
        failures++; $display("FAIL %0d op %s a=%h b=%h -> %h, expected %h", i, c.op.name(), a, b, out_q, x);
      end
      out_m = x;
      #0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // track register-file writes of the model
  always @(posedge clk) begin
    if (rst_n && !busy && ctx.op != OP_NOP && ctx.rf_we && ctx.op != OP_MUL)
      rf_m[ctx.rf_wa] <= refalu(ctx.op, srcv(ctx.sa, ctx), srcv(ctx.sb, ctx));
  end
endmodule
