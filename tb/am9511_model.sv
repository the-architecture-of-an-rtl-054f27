// am9511_model -- small behavioural model of an Am9511 arithmetic processor,
// for testbenches only.
//
// Models the pins the arithmetics module uses (CS, C/D, RD, WR, data in/out,
// PAUSE, END, EACK, all active high) and a subset of the command set: the
// 16-bit fixed-point commands SADD (0x6C), SSUB (0x6D, NOS - TOS) and SMUL
// (0x6E, lower 16 bits of NOS * TOS). Operands live on a byte stack: a data
// write pushes a byte, a data read pops one, and a 16-bit operand is pushed
// low byte first. A command write makes the APU busy for LATENCY cycles, after
// which the result (low byte first) replaces the two operands and END rises.
// While busy, PAUSE holds any access other than a status read. A status read
// returns {BUSY, 7'b0} and, like EACK, clears END. An access is taken on the
// clock edge where its strobe is high and PAUSE is low.
module am9511_model #(
  parameter int unsigned LATENCY = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs,
  input  logic       cd,
  input  logic       rd,
  input  logic       wr,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       pause,
  output logic       end_o,
  input  logic       eack
);
  logic [7:0] stk [16];
  int unsigned sp;           // number of bytes on the stack
  int unsigned busy_cnt;
  logic [7:0]  cmd;
  logic        busy;
  int unsigned n_cmds;

  assign busy  = busy_cnt != 0;
  assign pause = busy && cs && !(cd && rd);
  assign dout  = (cd) ? {busy, 7'b0} : (sp > 0 ? stk[sp-1] : 8'h00);

  function automatic logic [15:0] exec(input logic [7:0] c, input logic [15:0] nos, input logic [15:0] tos);
    case (c)
      8'h6C: return nos + tos;
      8'h6D: return nos - tos;
      8'h6E: return 16'(nos * tos);
      default: return tos;
    endcase
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= 0; busy_cnt <= 0; end_o <= 1'b0; cmd <= 8'h00; n_cmds <= 0;
    end else begin
      if (eack) end_o <= 1'b0;
      if (busy_cnt == 1) begin
        logic [15:0] tos, nos, r;
        tos = {stk[sp-1], stk[sp-2]};
        nos = {stk[sp-3], stk[sp-4]};
        r   = exec(cmd, nos, tos);
        stk[sp-4] <= r[7:0];
        stk[sp-3] <= r[15:8];
        sp <= sp - 2;
        end_o <= 1'b1;
      end
      if (busy) busy_cnt <= busy_cnt - 1;
      if (cs && !pause) begin
        if (wr && !cd) begin stk[sp] <= din; sp <= sp + 1; end
        if (rd && !cd && sp > 0) sp <= sp - 1;
        if (wr && cd) begin cmd <= din; busy_cnt <= LATENCY; n_cmds <= n_cmds + 1; end
        if (rd && cd) end_o <= 1'b0;
      end
    end
  end
endmodule
