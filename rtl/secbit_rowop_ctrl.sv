// secbit_rowop_ctrl: memory-controller extension that executes Secbit row operations.
//
// What it does: accepts one row operation at a time (RCP copy, RIV invert, RAN and, ROR
// or, RXR xor, RCL clear, RST set) and drives a subarray through the wordline, sense and
// precharge commands that carry it out.
//
// How it works: every operation is a short list of steps (secbit_pkg::rop_phase). A copy
// step raises the source wordlines, fires the sense amplifiers one cycle later, raises
// the destination wordlines tRAS after the start, precharges 2*tRAS after the start and
// ends tRP later: 2*tRAS + tRP, the row-copy time of the source design. A step with no
// destination is a triple-row activation (SR, TR and AR or OR sensed together); it keeps
// the same length, "two activates and a precharge". A pulse step raises AP or OP for
// tRAS. RCP and RIV are one copy step, RAN and ROR three (copy to SR, copy to TR with the
// AP/OP pulse, triple activation), RCL and RST a pulse then a copy from AR or OR, and
// RXR the eleven steps of the source design's XOR recipe: IR<-~a, SR<-IR, TR<-b with
// AR cleared, AND, OR<-AR, IR<-~b, SR<-IR, TR<-a with AR cleared, AND, TR<-OR with OR
// set, and the final triple activation with OR. The result of RXR and ROR is left in
// SR, TR and OR; that of RAN in SR, TR and AR.
//
// Interface and timing: op_valid/op_ready handshake. op_ready is high when idle and in
// the last cycle of the running operation, so back-to-back operations follow without a
// gap; the first command of an accepted operation appears the next cycle. With tRAS = 3
// and tRP = 2 cycles (30 ns and 20 ns at a 10 ns clock, the values that give the source
// design's 80 ns row copy and 110 ns row clear) RCP/RIV take 8 cycles, RAN/ROR 24,
// RCL/RST 11 and RXR 88. The cycle counts and the clock are this design's choice; the
// step recipes are the source design's.
module secbit_rowop_ctrl
  import secbit_pkg::*;
#(
  parameter int unsigned T_RAS = 3,   // row active time, cycles (>= 2)
  parameter int unsigned T_RP  = 2    // precharge time, cycles (>= 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  // row operation in
  input  logic    op_valid,
  output logic    op_ready,
  input  rowop_t  op,
  output logic    busy,
  // subarray command out
  output sa_cmd_e sa_cmd,
  output wl_t     sa_wl
);

  localparam int unsigned COPY_LEN  = 2 * T_RAS + T_RP;
  localparam int unsigned PULSE_LEN = T_RAS;
  localparam int unsigned TW = $clog2(COPY_LEN + 1);

  rowop_t        cur_q;
  logic          busy_q;
  logic [3:0]    ph_q;      // current step
  logic [TW-1:0] cyc_q;     // cycle within the step

  phase_t        ph;
  logic [TW-1:0] ph_len;
  logic          last_cyc, last_ph;

  always_comb begin
    ph       = rop_phase(cur_q.op, cur_q.a, cur_q.b, 32'(ph_q));
    ph_len   = ph.pulse ? TW'(PULSE_LEN) : TW'(COPY_LEN);
    last_cyc = (cyc_q == ph_len - 1'b1);
    last_ph  = (32'(ph_q) == rop_phases(cur_q.op) - 1);
  end

  assign op_ready = !busy_q || (last_cyc && last_ph);
  assign busy     = busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ph_q   <= '0;
      cyc_q  <= '0;
      cur_q  <= '0;
    end else begin
      if (op_valid && op_ready) begin
        cur_q  <= op;
        busy_q <= 1'b1;
        ph_q   <= '0;
        cyc_q  <= '0;
      end else if (busy_q) begin
        if (last_cyc) begin
          cyc_q <= '0;
          if (last_ph) busy_q <= 1'b0;
          else         ph_q   <= ph_q + 1'b1;
        end else begin
          cyc_q <= cyc_q + 1'b1;
        end
      end
    end
  end

  // command for the current cycle of the current step
  always_comb begin
    sa_cmd = SA_NOP;
    sa_wl  = WL_NONE;
    if (busy_q) begin
      if (cyc_q == '0) begin
        sa_cmd = SA_ACT;
        sa_wl  = ph.src;
      end else if (!ph.pulse) begin
        if (cyc_q == TW'(1)) begin
          sa_cmd = SA_SENSE;
        end else if (cyc_q == TW'(T_RAS) && (ph.dst != WL_NONE)) begin
          sa_cmd = SA_ACT;
          sa_wl  = ph.dst;
        end else if (cyc_q == TW'(2 * T_RAS)) begin
          sa_cmd = SA_PRE;
        end
      end
    end
  end

  initial begin
    assert (T_RAS >= 2) else $error("T_RAS must leave a cycle between activation and sensing");
    assert (T_RP >= 1) else $error("T_RP must be at least one cycle");
  end

  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n)
    (op_valid && !op_ready) |=> op_valid);

endmodule
