// interrupt_ctrl -- eight-channel priority interrupt system of the module CPU.
//
// The 8080 has a single interrupt input; this block widens it to N_CH request
// channels in the manner of an I8214 priority controller. A rising edge on
// irq[n] latches a request for channel n. The highest pending channel (channel
// N_CH-1 is highest) is compared with the current-status register: when its
// status-group-select bit (sgs) is set, only a channel strictly above the
// stored level may interrupt; when clear, any pending channel may. int_req goes
// high while a request qualifies and the controller is enabled.
//
// During the CPU's interrupt-acknowledge fetch, vector carries the instruction
// RST n for the winning channel. On the completing edge (inta_done) that
// channel's latch is cleared, ack_ch pulses for it and the controller disables
// itself; the CPU re-enables it by writing the status register
// (status_we, status_wdata = {sgs, level[2:0]}). After reset the
// controller is enabled with sgs = 0. pending exposes the latched requests.
//
// The eight channels follow the design. Edge-triggered latching, the priority
// order, the status comparison and the re-enable rule are this
// implementation's reading of an I8214-based system.
module interrupt_ctrl #(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW = $clog2(N_CH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] irq,           // request inputs, rising-edge sensitive
  input  logic            status_we,     // CPU writes current status
  input  logic [3:0]      status_wdata,
  input  logic            inta_done,     // acknowledge fetch completes this edge
  output logic            int_req,       // to CPU INT
  output logic [7:0]      vector,        // RST instruction for the acknowledge
  output logic [N_CH-1:0] ack_ch,        // one-cycle: channel acknowledged
  output logic [N_CH-1:0] pending,
  output logic            enabled
);

  logic [N_CH-1:0] irq_q;
  logic            sgs;
  logic [CW-1:0]   level;
  logic [CW-1:0]   best;
  logic            any;
  logic            qualifies;

  // highest pending channel
  always_comb begin
    best = '0;
    any  = 1'b0;
    for (int i = 0; i < N_CH; i++) begin
      if (pending[i]) begin
        best = CW'(i);
        any  = 1'b1;
      end
    end
  end

  assign qualifies = any && (!sgs || best > level);
  assign int_req   = enabled && qualifies;
  assign vector    = 8'hC7 | 8'({3'(best), 3'b000});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q   <= '0;
      pending <= '0;
      sgs     <= 1'b0;
      level   <= '0;
      enabled <= 1'b1;
      ack_ch  <= '0;
    end else begin
      irq_q  <= irq;
      ack_ch <= '0;
      pending <= pending | (irq & ~irq_q);
      if (inta_done) begin
        pending[best] <= irq[best] & ~irq_q[best];
        ack_ch[best]  <= 1'b1;
        enabled       <= 1'b0;
      end
      if (status_we) begin
        sgs     <= status_wdata[3];
        level   <= CW'(status_wdata[2:0]);
        enabled <= 1'b1;
      end
    end
  end

  // at most one channel is acknowledged at a time
  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) (ack_ch & (ack_ch - 1'b1)) == '0);

endmodule
