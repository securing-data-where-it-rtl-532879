// secbit_subarray: one DRAM subarray extended with the five application-specific rows.
//
// What it does: stores ROWS regular rows of COLS bits, plus the rows SR, TR, AR, OR and
// IR, and a row of sense amplifiers (the local row buffer) shared by all of them. Every
// bitline runs past one cell of each row, so raising wordlines and firing the sense
// amplifiers moves whole rows at once; this is what the Secbit row operations build on.
//
// How it works: this is a cycle-level digital model of the analog array. Raising a
// wordline (SA_ACT) connects cells to their bitlines; with the sense amplifiers off the
// cells only share charge. SA_SENSE resolves each bitline to the majority value of the
// connected cells (one cell: its own value; three cells: the majority vote that gives
// AND with a zero third cell or OR with a one) and writes that value back into every
// connected cell. A wordline raised while the sense amplifiers are on copies the bitline
// into the newly connected cells. IP connects IR to the complementary bitline, so IR
// receives (and contributes) the inverse. AP and OP are pulses that force AR to 0 and OR
// to 1 without touching the bitlines; they win over any bitline connection of the same
// cell in that cycle. SA_PRE lowers every wordline and returns the bitlines to
// precharge. SA_RD / SA_WR move one IO_W-bit word between the I/O path and the sensed
// row, as a normal column access does.
//
// Interface and timing: one command per clock, acting at the rising edge. rdata holds
// the word read by SA_RD from the next cycle on. The model keeps no analog time: the
// controller that drives it waits tRAS/tRP between commands. Regular-row and ASR
// contents are not reset (DRAM cells have no reset); the wordline and sense state is.
//
// From the source design: the row set, wordline names, cell connections (AP to ground,
// OP to VDD, IP to the complementary bitline), majority sensing and the 512 x 8192
// subarray size with an 8-bit I/O word. This design's own choices: the command encoding,
// the dominance of AP/OP over a bitline connection, and that an even number of connected
// cells at sensing is a usage error (flagged by an assertion).
module secbit_subarray
  import secbit_pkg::*;
#(
  parameter int unsigned ROWS = 512,    // regular rows per subarray
  parameter int unsigned COLS = 8192,   // bitlines per row
  parameter int unsigned IO_W = 8,      // bits per column access
  localparam int unsigned CAW = (COLS / IO_W > 1) ? $clog2(COLS / IO_W) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  sa_cmd_e         cmd,
  input  wl_t             wl,      // wordlines to raise with SA_ACT
  input  logic [CAW-1:0]  col,     // column word for SA_RD / SA_WR
  input  logic [IO_W-1:0] wdata,
  output logic [IO_W-1:0] rdata
);

  typedef logic [COLS-1:0] row_bits_t;

  row_bits_t mem [ROWS];
  row_bits_t sr_q, tr_q, ar_q, or_q, ir_q;   // application-specific rows
  row_bits_t bl_q;                           // sensed bitline values (local row buffer)
  wl_t       raised_q;                       // wordlines currently raised
  logic      sa_on_q;

  // ---- charge sharing and sensing -------------------------------------------------
  // Each connected cell contributes its value (IR through IP contributes its inverse);
  // a bitline resolves to 1 where the connected cells holding 1 are the majority.
  row_bits_t x_rr, x_sr, x_tr, x_ar, x_or, x_ix, x_ip;
  row_bits_t s1, c1, s2, c2, cnt0, c3, cnt1, cnt2, sensed;
  logic [2:0] n_conn;

  always_comb begin
    x_rr = raised_q.rr_en  ? mem[raised_q.rr] : '0;
    x_sr = raised_q.asr.sx ? sr_q  : '0;
    x_tr = raised_q.asr.tx ? tr_q  : '0;
    x_ar = raised_q.asr.ax ? ar_q  : '0;
    x_or = raised_q.asr.ox ? or_q  : '0;
    x_ix = raised_q.asr.ix ? ir_q  : '0;
    x_ip = raised_q.asr.ip ? ~ir_q : '0;
    n_conn = 3'(raised_q.rr_en) + 3'(raised_q.asr.sx) + 3'(raised_q.asr.tx)
           + 3'(raised_q.asr.ax) + 3'(raised_q.asr.ox) + 3'(raised_q.asr.ix)
           + 3'(raised_q.asr.ip);
    // bit-parallel population count of the seven contributions: cnt2 cnt1 cnt0
    s1   = x_rr ^ x_sr ^ x_tr;
    c1   = (x_rr & x_sr) | (x_rr & x_tr) | (x_sr & x_tr);
    s2   = x_ar ^ x_or ^ x_ix;
    c2   = (x_ar & x_or) | (x_ar & x_ix) | (x_or & x_ix);
    cnt0 = s1 ^ s2 ^ x_ip;
    c3   = (s1 & s2) | (s1 & x_ip) | (s2 & x_ip);
    cnt1 = c1 ^ c2 ^ c3;
    cnt2 = (c1 & c2) | (c1 & c3) | (c2 & c3);
    // majority: count >= (n_conn + 1) / 2
    case (n_conn)
      3'd0, 3'd1, 3'd2: sensed = cnt0 | cnt1 | cnt2;
      3'd3, 3'd4:       sensed = cnt1 | cnt2;
      3'd5, 3'd6:       sensed = cnt2 | (cnt1 & cnt0);
      default:          sensed = cnt2;
    endcase
  end

  // ---- state update -------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      raised_q <= WL_NONE;
      sa_on_q  <= 1'b0;
      bl_q     <= '0;
      rdata    <= '0;
    end else begin
      case (cmd)
        SA_ACT: begin
          if (sa_on_q) begin
            // newly connected cells take the value the sense amplifiers hold
            if (wl.rr_en)   mem[wl.rr] <= bl_q;
            if (wl.asr.sx)  sr_q <= bl_q;
            if (wl.asr.tx)  tr_q <= bl_q;
            if (wl.asr.ax)  ar_q <= bl_q;
            if (wl.asr.ox)  or_q <= bl_q;
            if (wl.asr.ix)  ir_q <= bl_q;
            if (wl.asr.ip)  ir_q <= ~bl_q;
          end
          // precharge wordlines: AR to ground, OR to VDD
          if (wl.asr.ap) ar_q <= '0;
          if (wl.asr.op) or_q <= '1;
          if (wl.rr_en && !raised_q.rr_en) begin
            raised_q.rr_en <= 1'b1;
            raised_q.rr    <= wl.rr;
          end
          raised_q.asr <= raised_q.asr | (wl.asr & ~(A_AP | A_OP));
        end
        SA_SENSE: begin
          sa_on_q <= 1'b1;
          bl_q    <= sensed;
          // restore: every connected cell is driven to the sensed value
          if (n_conn > 3'd1) begin
            if (raised_q.rr_en)   mem[raised_q.rr] <= sensed;
            if (raised_q.asr.sx)  sr_q <= sensed;
            if (raised_q.asr.tx)  tr_q <= sensed;
            if (raised_q.asr.ax)  ar_q <= sensed;
            if (raised_q.asr.ox)  or_q <= sensed;
            if (raised_q.asr.ix)  ir_q <= sensed;
            if (raised_q.asr.ip)  ir_q <= ~sensed;
          end
        end
        SA_PRE: begin
          raised_q <= WL_NONE;
          sa_on_q  <= 1'b0;
        end
        SA_RD: begin
          rdata <= bl_q[col*IO_W +: IO_W];
        end
        SA_WR: begin
          bl_q[col*IO_W +: IO_W] <= wdata;
          if (raised_q.rr_en) mem[raised_q.rr][col*IO_W +: IO_W] <= wdata;
        end
        default: ;
      endcase
    end
  end

  // ---- usage rules ----------------------------------------------------------------
  initial begin
    assert (ROWS <= (1 << ROW_AW)) else $error("ROWS exceeds the local row address");
    assert (COLS % IO_W == 0) else $error("COLS must be a multiple of IO_W");
  end

  // sensing needs an odd number of connected cells so that no bitline stays at VDD/2
  a_odd_share: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == SA_SENSE) |-> n_conn[0]);
  // column accesses need sensed bitlines
  a_col_sensed: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == SA_RD || cmd == SA_WR) |-> sa_on_q);
  // a regular row address must exist
  a_row_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == SA_ACT && wl.rr_en) |-> (32'(wl.rr) < ROWS));

endmodule
