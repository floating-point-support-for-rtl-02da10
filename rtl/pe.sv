// pe: 16-bit processing element of the FloRA array, in the role of a mantissa
// PE or an exponent PE.
//
// Every cycle the PE executes the context word `ctx` it is given: two operands
// are selected from the neighbour links, the partner PE, the local register
// file, an immediate or the row's two read buses; single-cycle integer
// results go to the output register (and optionally the register file) at the
// next clock edge. Multi-cycle operations (integer MUL on the row's shared
// multiplier and the floating-point operations FADD, FSUB, FMUL, FDIV, FSQRT)
// are started by one context word; the PE's FSM then drives the data path
// step by step and the contexts presented meanwhile must be NOP (`busy` is
// high). The result is registered after 6 (FADD/FSUB), 4 (FMUL) or 7
// (FDIV/FSQRT) clock edges, counting the edge that ends the issue cycle.
//
// A floating-point operation runs on an FPU-PE cluster: both PEs of the pair
// receive the same opcode in the same cycle, the mantissa PE (IS_MANT = 1) on
// {sign, 15-bit fraction} words and the exponent PE (IS_MANT = 0) on biased
// 8-bit exponents. They exchange intermediate values over the registered pair
// link (`pmsg_in`/`pmsg_out`), so a value sent in step k is used in step k+1.
// The mantissa PE uses its leading-one detector and the row's shared
// multiplier, divider and square-root unit; the exponent PE uses its
// saturation module. Step schedules (step 1 is the issue cycle):
//   FADD  E1 compare exponents, send |difference| | M1 compare fractions
//         M2 align smaller operand  M3 add/subtract  M4 leading-one -> E
//         M5 normalise + round -> E  E5 new exponent, range flags -> M
//         E6 add rounding carry, saturate   M6 apply range flags
//   FMUL  E1 EA+EB  E2 -bias  | M1 issue to multiplier  M2 product, radix
//         change C -> E  E3 +C, range flags -> M  M3 round -> E  E4/M4 final
//   FDIV  E1 EA-EB  E2 +bias  | M1 issue to divider  M5 quotient, C -> E
//         E6 -C, range flags  M6 round -> E  E7/M7 final
//   FSQRT E1 parity -> M  E2-E4 (E-bias)>>>1+bias | M2 shift by parity, issue
//         to square-root unit  M5 root  M6 round -> E  E7/M7 final
// The division of work between the two PEs and the FADD/FMUL step order
// follow the document; the exact placement of rounding and range checks, the
// three guard bits, round-half-up rounding, flush of zero exponents to zero
// and the NaN encoding are this design's choices.
module pe
  import flora_pkg::*;
#(
  parameter bit IS_MANT = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctx_t            ctx,
  input  logic [DW-1:0]   nbr [8],      // W, E, N, S, W2, E2, N2, S2
  input  logic [DW-1:0]   pair_data,    // partner's output register
  input  pair_msg_t       pmsg_in,
  output pair_msg_t       pmsg_out,
  input  logic [DW-1:0]   bus0,
  input  logic [DW-1:0]   bus1,
  output logic            rd0_en,
  output logic            rd1_en,
  output logic            st_en,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [DW-1:0]   out_q,
  output logic            busy,
  output logic            done,         // high for one cycle after a result was registered
  // shared multiplier of the row
  output logic            mul_req,
  output logic [DW-1:0]   mul_a,
  output logic [DW-1:0]   mul_b,
  input  logic [2*DW-1:0] mul_p,
  // shared divider of the row (tied off where the row has none)
  output logic            div_req,
  output logic [DW-1:0]   div_a,
  output logic [DW-1:0]   div_b,
  input  logic [18:0]     div_q,
  // shared square-root unit of the row (tied off where the row has none)
  output logic            sqrt_req,
  output logic [37:0]     sqrt_rad,
  input  logic [18:0]     sqrt_root
);

  // ---------------------------------------------------------------- operands
  logic [DW-1:0] rf [RF_DEPTH];
  logic [DW-1:0] opa, opb;

  function automatic logic [DW-1:0] pick(src_e s, ctx_t c, logic [DW-1:0] n [8],
                                         logic [DW-1:0] pd, logic [DW-1:0] rfv,
                                         logic [DW-1:0] b0, logic [DW-1:0] b1,
                                         logic [DW-1:0] self);
    case (s)
      SRC_W, SRC_E, SRC_N, SRC_S, SRC_W2, SRC_E2, SRC_N2, SRC_S2: return n[s[2:0]];
      SRC_PAIR: return pd;
      SRC_RF:   return rfv;
      SRC_IMM:  return {{(DW-7){c.imm[6]}}, c.imm};
      SRC_BUS0: return b0;
      SRC_BUS1: return b1;
      SRC_SELF: return self;
      default:  return '0;
    endcase
  endfunction

  assign opa = pick(ctx.sa, ctx, nbr, pair_data, rf[ctx.rf_ra], bus0, bus1, out_q);
  assign opb = pick(ctx.sb, ctx, nbr, pair_data, rf[ctx.rf_ra], bus0, bus1, out_q);

  logic issue;      // a context is taken this cycle
  logic multi;      // ... and it starts a multi-cycle operation
  assign issue = !busy && (ctx.op != OP_NOP);
  assign multi = issue && (is_fp_op(ctx.op) || ctx.op == OP_MUL);

  assign rd0_en   = issue && (ctx.sa == SRC_BUS0 || ctx.sb == SRC_BUS0);
  assign rd1_en   = issue && (ctx.sa == SRC_BUS1 || ctx.sb == SRC_BUS1);
  assign st_en    = !busy && ctx.st;
  assign mem_addr = ctx.addr;

  // ------------------------------------------------------- integer ALU
  logic [DW-1:0] alu;
  always_comb begin
    case (ctx.op)
      OP_MOV: alu = opa;
      OP_ADD: alu = opa + opb;
      OP_SUB: alu = opa - opb;
      OP_ABS: alu = opa[DW-1] ? -opa : opa;
      OP_AND: alu = opa & opb;
      OP_OR:  alu = opa | opb;
      OP_XOR: alu = opa ^ opb;
      OP_SHL: alu = opa << opb[3:0];
      OP_SHR: alu = opa >> opb[3:0];
      OP_SRA: alu = DW'($signed(opa) >>> opb[3:0]);
      OP_MIN: alu = ($signed(opa) < $signed(opb)) ? opa : opb;
      OP_MAX: alu = ($signed(opa) < $signed(opb)) ? opb : opa;
      OP_SLT: alu = DW'($signed(opa) < $signed(opb));
      default: alu = out_q;
    endcase
  end

  // ------------------------------------------------------- FSM state
  op_e               op_q;
  logic [2:0]        step_q;          // step now executing (1 = issue cycle)
  logic              rf_we_q;
  logic [1:0]        rf_wa_q;
  // mantissa-role registers
  logic [MI_W-1:0]   ma_q, mb_q, acc_q;
  logic              sa_q, sb_q, cmp_q, rinc_q, exz_q;
  logic [FRAC_W-1:0] frac_q;
  // exponent-role registers
  logic signed [DW-1:0] ex_q, e1_q;
  logic [7:0]        sp_q;            // special-case flags (see below)

  // range / special flags sent from the exponent PE to the mantissa PE
  localparam int F_OVF0 = 0, F_OVF1 = 1, F_UNF0 = 2, F_UNF1 = 3,
                 F_ZERO = 4, F_INF = 5, F_NAN = 6;

  // shared-unit requests are combinational from the issue-cycle operands
  logic [DW-1:0] sq_x;
  always_comb begin
    mul_req  = 1'b0; mul_a = '0; mul_b = '0;
    div_req  = 1'b0; div_a = '0; div_b = '0;
    sqrt_req = 1'b0; sqrt_rad = '0;
    sq_x     = {1'b1, ma_q[17:3]};
    if (multi && ctx.op == OP_MUL) begin
      mul_req = 1'b1; mul_a = opa; mul_b = opb;
    end
    if (IS_MANT && multi && ctx.op == OP_FMUL) begin
      mul_req = 1'b1; mul_a = {1'b1, opa[14:0]}; mul_b = {1'b1, opb[14:0]};
    end
    if (IS_MANT && multi && ctx.op == OP_FDIV) begin
      div_req = 1'b1; div_a = {1'b1, opa[14:0]}; div_b = {1'b1, opb[14:0]};
    end
    if (IS_MANT && busy && op_q == OP_FSQRT && step_q == 3'd2) begin
      // odd unbiased exponent: radicand doubled so the exponent halves exactly
      sqrt_req = 1'b1;
      sqrt_rad = pmsg_in.flags[0] ? (38'(sq_x) << 22) : (38'(sq_x) << 21);
    end
  end

  // leading-one detector of the mantissa PE
  logic [4:0] lz_pos;
  logic       lz_zero;
  lod #(.W(MI_W)) u_lod (.din(acc_q), .pos(lz_pos), .zero(lz_zero));

  // saturation module of the exponent PE
  logic signed [DW-1:0] sat_in;
  logic [7:0]           sat_out;
  logic                 sat_ovf, sat_unf;
  assign sat_in = e1_q + DW'(pmsg_in.flags[0]);
  exp_sat #(.W(DW)) u_sat (.e_in(sat_in), .e_out(sat_out), .ovf(sat_ovf), .unf(sat_unf));

  // round half up at guard bit 2; returns {carry-out, fraction}
  function automatic logic [FRAC_W:0] round_m(logic [MI_W-1:0] m);
    logic [16:0] r;
    r = 17'(m[18:3]) + 17'(m[2]);
    return r[16] ? {1'b1, {FRAC_W{1'b0}}} : {1'b0, r[14:0]};
  endfunction

  // range flags of a tentative exponent e (for rounding carry 0 and 1)
  function automatic logic [3:0] range_flags(logic signed [DW-1:0] e);
    return {(e + 1) <= 0, e <= 0, (e + 1) >= 255, e >= 255};
  endfunction

  function automatic pair_msg_t msg(logic [3:0] tag, logic [7:0] fl, logic [DW-1:0] d);
    pair_msg_t m;
    m.valid = 1'b1; m.tag = tag; m.flags = fl; m.data = d;
    return m;
  endfunction

  logic [2:0] last_step;
  assign last_step = 3'(op_latency(op_q));

  always_ff @(posedge clk or negedge rst_n) begin
    logic [MI_W-1:0]      xa, xb, big, sml, nrm;
    logic [FRAC_W:0]      rr;
    logic                 abig, zero_r, ovf, unf, fin;
    logic [DW-1:0]        d;
    logic signed [DW-1:0] e;
    logic [31:0]          p;
    logic [18:0]          q;
    logic [DW-1:0]        res;
    if (!rst_n) begin
      out_q    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      op_q     <= OP_NOP;
      step_q   <= '0;
      rf_we_q  <= 1'b0;
      rf_wa_q  <= '0;
      ma_q     <= '0; mb_q <= '0; acc_q <= '0;
      sa_q     <= 1'b0; sb_q <= 1'b0; cmp_q <= 1'b0; rinc_q <= 1'b0; exz_q <= 1'b0;
      frac_q   <= '0;
      ex_q     <= '0; e1_q <= '0; sp_q <= '0;
      pmsg_out <= '0;
      for (int i = 0; i < int'(RF_DEPTH); i++) rf[i] <= '0;
    end else begin
      pmsg_out <= '0;
      done     <= 1'b0;
      fin      = 1'b0;
      res      = out_q;
      if (!busy) begin
        if (issue && !multi) begin
          out_q <= alu;
          done  <= 1'b1;
          if (ctx.rf_we) rf[ctx.rf_wa] <= alu;
        end
        if (multi) begin
          busy    <= 1'b1;
          op_q    <= ctx.op;
          step_q  <= 3'd2;
          rf_we_q <= ctx.rf_we;
          rf_wa_q <= ctx.rf_wa;
          sp_q    <= '0;
          // ---------------- step 1 (issue cycle)
          if (IS_MANT) begin
            ma_q  <= {2'b00, opa[14:0], 3'b000};
            mb_q  <= {2'b00, opb[14:0], 3'b000};
            sa_q  <= opa[15];
            sb_q  <= opb[15] ^ (ctx.op == OP_FSUB);
            cmp_q <= (opa[14:0] >= opb[14:0]);
            if (ctx.op == OP_FMUL || ctx.op == OP_FDIV) sa_q <= opa[15] ^ opb[15];
            if (ctx.op == OP_FSQRT) pmsg_out <= msg(4'd1, {7'd0, opa[15]}, '0);
          end else begin
            case (ctx.op)
              OP_FADD, OP_FSUB: begin
                e    = $signed(opa) - $signed(opb);
                abig = (e >= 0);
                d    = abig ? e : -e;
                ex_q <= abig ? $signed(opa) : $signed(opb);
                pmsg_out <= msg(4'd1, {4'd0, opb[7:0] != 0, opa[7:0] != 0, e == 0, abig}, d);
              end
              OP_FMUL: begin
                ex_q <= $signed(opa) + $signed(opb);
                sp_q[F_ZERO] <= (opa[7:0] == 0) || (opb[7:0] == 0);
              end
              OP_FDIV: begin
                ex_q <= $signed(opa) - $signed(opb);
                sp_q[F_ZERO] <= (opa[7:0] == 0) && (opb[7:0] != 0);
                sp_q[F_INF]  <= (opa[7:0] != 0) && (opb[7:0] == 0);
                sp_q[F_NAN]  <= (opa[7:0] == 0) && (opb[7:0] == 0);
              end
              OP_FSQRT: begin
                ex_q <= $signed(opa);
                sp_q[F_ZERO] <= (opa[7:0] == 0);
                // unbiased exponent odd <=> biased exponent even
                pmsg_out <= msg(4'd1, {7'd0, !opa[0]}, '0);
              end
              default: ;
            endcase
          end
        end
      end else begin
        // ---------------- steps 2 .. latency
        if (IS_MANT) begin
          case (op_q)
            OP_FADD, OP_FSUB: case (step_q)
              3'd2: begin   // align the smaller operand (message from E1)
                xa   = ma_q | (MI_W'(pmsg_in.flags[2]) << 18);
                xb   = mb_q | (MI_W'(pmsg_in.flags[3]) << 18);
                abig = pmsg_in.flags[1] ? cmp_q : pmsg_in.flags[0];
                big  = abig ? xa : xb;
                sml  = abig ? xb : xa;
                ma_q <= big;
                mb_q <= (pmsg_in.data >= DW'(MI_W)) ? '0 : (sml >> pmsg_in.data);
                sa_q <= abig ? sa_q : sb_q;      // result sign
                cmp_q <= sa_q ^ sb_q;            // effective subtraction
              end
              3'd3: acc_q <= cmp_q ? (ma_q - mb_q) : (ma_q + mb_q);
              3'd4: begin   // leading-one detection, position to E
                pmsg_out <= msg(4'd4, {7'd0, lz_zero}, DW'(lz_pos));
                exz_q <= lz_zero;
              end
              3'd5: begin   // normalise and round
                nrm = (lz_pos == 5'd19) ? (acc_q >> 1) : (acc_q << (5'd18 - lz_pos));
                rr  = round_m(nrm);
                rinc_q <= rr[FRAC_W];
                frac_q <= rr[FRAC_W-1:0];
                pmsg_out <= msg(4'd5, {7'd0, rr[FRAC_W]}, '0);
              end
              3'd6: begin   // apply range flags from E5
                ovf = rinc_q ? pmsg_in.flags[F_OVF1] : pmsg_in.flags[F_OVF0];
                unf = rinc_q ? pmsg_in.flags[F_UNF1] : pmsg_in.flags[F_UNF0];
                zero_r = pmsg_in.flags[F_ZERO];
                res = {zero_r ? 1'b0 : sa_q, (ovf || unf || zero_r) ? {FRAC_W{1'b0}} : frac_q};
                fin = 1'b1;
              end
              default: ;
            endcase
            OP_FMUL: case (step_q)
              3'd2: begin   // product back from the shared multiplier
                p = mul_p;
                acc_q <= p[31] ? {1'b0, p[31:13]} : {1'b0, p[30:12]};
                pmsg_out <= msg(4'd2, {7'd0, p[31]}, '0);
              end
              3'd3: begin
                rr = round_m(acc_q);
                rinc_q <= rr[FRAC_W];
                frac_q <= rr[FRAC_W-1:0];
                pmsg_out <= msg(4'd3, {7'd0, rr[FRAC_W]}, '0);
              end
              3'd4: fin = 1'b1;
              default: ;
            endcase
            OP_FDIV: case (step_q)
              3'd5: begin   // quotient back from the shared divider
                q = div_q;
                acc_q <= q[18] ? {1'b0, q} : {1'b0, q[17:0], 1'b0};
                pmsg_out <= msg(4'd5, {7'd0, !q[18]}, '0);
              end
              3'd6: begin
                rr = round_m(acc_q);
                rinc_q <= rr[FRAC_W];
                frac_q <= rr[FRAC_W-1:0];
                pmsg_out <= msg(4'd6, {7'd0, rr[FRAC_W]}, '0);
              end
              3'd7: fin = 1'b1;
              default: ;
            endcase
            OP_FSQRT: case (step_q)
              3'd5: acc_q <= {1'b0, sqrt_root};
              3'd6: begin
                rr = round_m(acc_q);
                rinc_q <= rr[FRAC_W];
                frac_q <= rr[FRAC_W-1:0];
                pmsg_out <= msg(4'd6, {7'd0, rr[FRAC_W]}, '0);
              end
              3'd7: fin = 1'b1;
              default: ;
            endcase
            default: ;
          endcase
          // final step of FMUL/FDIV/FSQRT: range flags arrived in sp_q
          if (fin && op_q != OP_FADD && op_q != OP_FSUB) begin
            ovf = rinc_q ? sp_q[F_OVF1] : sp_q[F_OVF0];
            unf = rinc_q ? sp_q[F_UNF1] : sp_q[F_UNF0];
            if (sp_q[F_NAN])
              res = {1'b0, 15'h4000};
            else if (sp_q[F_ZERO] || unf || ovf || sp_q[F_INF])
              res = {sa_q, {FRAC_W{1'b0}}};
            else
              res = {sa_q, frac_q};
          end
          // range flags sent by the exponent PE are kept until the last step
          if (pmsg_in.valid && pmsg_in.flags[7]) sp_q <= pmsg_in.flags;
        end else begin
          // ------------------------------------------------ exponent PE
          case (op_q)
            OP_FADD, OP_FSUB: case (step_q)
              3'd5: begin   // exponent after normalisation (position from M4)
                e = ex_q + $signed(pmsg_in.data) - 16'sd18;
                e1_q <= e;
                exz_q <= pmsg_in.flags[0];
                pmsg_out <= msg(4'd5, {1'b1, 2'b00, pmsg_in.flags[0], range_flags(e)}, '0);
              end
              3'd6: begin   // add rounding carry from M5, saturate
                res = {8'h00, exz_q ? 8'h00 : sat_out};
                fin = 1'b1;
              end
              default: ;
            endcase
            OP_FMUL: case (step_q)
              3'd2: ex_q <= ex_q - 16'(BIAS);
              3'd3: begin   // radix-point change C from M2
                e = ex_q + DW'(pmsg_in.flags[0]);
                e1_q <= e;
                pmsg_out <= msg(4'd3, {1'b1, 2'b00, sp_q[F_ZERO], range_flags(e)}, '0);
              end
              3'd4: begin
                res = {8'h00, sp_q[F_ZERO] ? 8'h00 : sat_out};
                fin = 1'b1;
              end
              default: ;
            endcase
            OP_FDIV: case (step_q)
              3'd2: ex_q <= ex_q + 16'(BIAS);
              3'd6: begin   // quotient below one: C from M5
                e = ex_q - DW'(pmsg_in.flags[0]);
                e1_q <= e;
                pmsg_out <= msg(4'd6, {1'b1, sp_q[F_NAN], sp_q[F_INF], sp_q[F_ZERO],
                                       range_flags(e)}, '0);
              end
              3'd7: begin
                res = {8'h00, sp_q[F_NAN] || sp_q[F_INF] ? 8'hFF :
                              sp_q[F_ZERO] ? 8'h00 : sat_out};
                fin = 1'b1;
              end
              default: ;
            endcase
            OP_FSQRT: case (step_q)
              3'd2: begin
                ex_q <= ex_q - 16'(BIAS);
                sp_q[F_NAN] <= pmsg_in.flags[0] && !sp_q[F_ZERO];   // negative operand
              end
              3'd3: ex_q <= ex_q >>> 1;
              3'd4: ex_q <= ex_q + 16'(BIAS);
              3'd5: begin
                e1_q <= ex_q;
                pmsg_out <= msg(4'd5, {1'b1, sp_q[F_NAN], 1'b0, sp_q[F_ZERO], 4'b0000}, '0);
              end
              3'd7: begin
                res = {8'h00, sp_q[F_NAN] ? 8'hFF : sp_q[F_ZERO] ? 8'h00 : sat_out};
                fin = 1'b1;
              end
              default: ;
            endcase
            default: ;
          endcase
        end
        // integer multiply (either role): product arrives in step 2
        if (op_q == OP_MUL) begin
          res = mul_p[DW-1:0];
          fin = 1'b1;
        end
        if (fin || step_q == last_step) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          out_q <= res;
          if (rf_we_q) rf[rf_wa_q] <= res;
          step_q <= '0;
        end else begin
          step_q <= step_q + 3'd1;
        end
      end
    end
  end

endmodule
