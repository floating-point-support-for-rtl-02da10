// exec_ctrl: execution control unit of the RCM.
//
// Holds the RCM's control registers and sequences a kernel run. Registers
// (word addresses):
//   0 CTRL    write: bit 0 start a kernel, bit 1 swap the data-memory sets
//   1 STATUS  read : bit 0 busy, bit 1 done (sticky until the next start),
//                    bit 2 active data-memory set
//   2 BUSCFG  read/write: [1:0] bank on read bus 0, [3:2] bank on read bus 1,
//                    [5:4] bank on write bus, [8:6] floating-point mode of
//                    read bus 0, read bus 1, write bus, [9] spatial mapping
//                    (0: temporal mapping with loop pipelining)
// A start pulses the configuration control unit; when it has issued its last
// address, the unit waits until the context has travelled through all COLS
// columns and no PE is still busy with a multi-cycle operation, then sets
// done. A swap request is ignored while a kernel runs. The document names
// the unit and shows its links; its registers and sequencing are this
// design's choice.
module exec_ctrl #(
  parameter int unsigned COLS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_en,
  input  logic        h_we,
  input  logic [1:0]  h_addr,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  output logic        ccu_start,
  input  logic        ccu_done,
  input  logic        array_busy,
  output logic        act_set,
  output logic [1:0]  bank_sel [3],
  output logic [2:0]  fp_mode,
  output logic        spatial,
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e     st_q;
  logic [9:0] buscfg_q;
  logic [7:0] drain_q;

  assign bank_sel[0] = buscfg_q[1:0];
  assign bank_sel[1] = buscfg_q[3:2];
  assign bank_sel[2] = buscfg_q[5:4];
  assign fp_mode     = buscfg_q[8:6];
  assign spatial     = buscfg_q[9];
  assign busy        = (st_q != S_IDLE);

  always_comb begin
    case (h_addr)
      2'd1:    h_rdata = {29'd0, act_set, done, busy};
      2'd2:    h_rdata = {22'd0, buscfg_q};
      default: h_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      buscfg_q  <= 10'b0_000_10_01_00;   // banks 0, 1 read, bank 2 written
      drain_q   <= '0;
      act_set   <= 1'b0;
      ccu_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      ccu_start <= 1'b0;
      if (h_en && h_we && h_addr == 2'd2) buscfg_q <= h_wdata[9:0];
      case (st_q)
        S_IDLE: if (h_en && h_we && h_addr == 2'd0) begin
          if (h_wdata[1]) act_set <= !act_set;
          if (h_wdata[0]) begin
            ccu_start <= 1'b1;
            done      <= 1'b0;
            st_q      <= S_RUN;
          end
        end
        S_RUN: if (ccu_done) begin
          st_q    <= S_DRAIN;
          drain_q <= 8'(COLS + 1);
        end
        S_DRAIN: begin
          if (drain_q != 0) drain_q <= drain_q - 1'b1;
          else if (!array_busy) begin
            st_q <= S_IDLE;
            done <= 1'b1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
