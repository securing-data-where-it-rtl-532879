// secbit_pkg: types and constants shared by the Secbit in-memory encryption engine.
//
// The engine works on whole DRAM rows. A subarray holds ordinary rows plus five
// application-specific rows (ASRs): SR and TR (sources/scratch), AR (AND row, can be
// discharged through its precharge wordline AP), OR (OR row, charged through OP) and
// IR (inversion row, whose second wordline IP ties the cell to the complementary
// bitline). The row names, the wordline names SX/TX/AX/AP/OX/OP/IX/IP and the seven
// row operations RCP, RIV, RAN, ROR, RXR, RCL and RST follow the source design; the
// encodings below are this implementation's own.
package secbit_pkg;

  // Local row address inside one subarray (512 rows -> 9 bits).
  localparam int unsigned ROW_AW = 9;

  // Wordlines of the application-specific rows.
  typedef struct packed {
    logic sx;   // SR wordline
    logic tx;   // TR wordline
    logic ax;   // AR wordline to the bitline
    logic ap;   // AR precharge wordline: cell to ground
    logic ox;   // OR wordline to the bitline
    logic op;   // OR precharge wordline: cell to VDD
    logic ix;   // IR wordline to the bitline
    logic ip;   // IR second wordline to the complementary bitline
  } asr_wl_t;

  // A set of wordlines raised together: at most one regular row plus any ASR lines.
  typedef struct packed {
    logic              rr_en;
    logic [ROW_AW-1:0] rr;
    asr_wl_t           asr;
  } wl_t;

  localparam wl_t WL_NONE = '0;

  // Primitive commands a subarray understands, one per clock.
  typedef enum logic [2:0] {
    SA_NOP   = 3'd0,
    SA_ACT   = 3'd1,  // raise the wordlines in wl (adds to those already raised)
    SA_SENSE = 3'd2,  // enable the sense amplifiers
    SA_PRE   = 3'd3,  // lower all wordlines, disable sense amplifiers, precharge bitlines
    SA_RD    = 3'd4,  // read one I/O word from the sensed row
    SA_WR    = 3'd5   // write one I/O word into the sensed row
  } sa_cmd_e;

  // Application-specific rows as operands of a row operation.
  typedef enum logic [2:0] {
    ASR_SR = 3'd0,
    ASR_TR = 3'd1,
    ASR_AR = 3'd2,
    ASR_OR = 3'd3,
    ASR_IR = 3'd4
  } asr_e;

  // Operand of a row operation: a regular row or an ASR.
  typedef struct packed {
    logic              is_asr;
    asr_e              asr;
    logic [ROW_AW-1:0] addr;
  } row_t;

  // The seven row operations.
  typedef enum logic [2:0] {
    ROP_RCP = 3'd0,  // a -> b
    ROP_RIV = 3'd1,  // IR <- ~a
    ROP_RAN = 3'd2,  // SR,TR,AR <- a & b
    ROP_ROR = 3'd3,  // SR,TR,OR <- a | b
    ROP_RXR = 3'd4,  // SR,TR,OR <- a ^ b
    ROP_RCL = 3'd5,  // a <- 0
    ROP_RST = 3'd6   // a <- 1
  } rop_e;

  typedef struct packed {
    rop_e op;
    row_t a;
    row_t b;
  } rowop_t;

  // One step of a row operation: a pulse on a precharge wordline, or a
  // source activation + sense (+ destination activation) + precharge.
  typedef struct packed {
    logic pulse;
    wl_t  src;
    wl_t  dst;
  } phase_t;

  function automatic row_t rr_row(input logic [ROW_AW-1:0] addr);
    row_t r;
    r.is_asr = 1'b0;
    r.asr    = ASR_SR;
    r.addr   = addr;
    return r;
  endfunction

  function automatic row_t asr_row(input asr_e which);
    row_t r;
    r.is_asr = 1'b1;
    r.asr    = which;
    r.addr   = '0;
    return r;
  endfunction

  // Wordline set that connects an operand row to the bitlines.
  function automatic wl_t row_wl(input row_t r);
    wl_t w;
    w = WL_NONE;
    if (!r.is_asr) begin
      w.rr_en = 1'b1;
      w.rr    = r.addr;
    end else begin
      case (r.asr)
        ASR_SR:  w.asr.sx = 1'b1;
        ASR_TR:  w.asr.tx = 1'b1;
        ASR_AR:  w.asr.ax = 1'b1;
        ASR_OR:  w.asr.ox = 1'b1;
        default: w.asr.ix = 1'b1;
      endcase
    end
    return w;
  endfunction

  function automatic wl_t asr_only(input asr_wl_t a);
    wl_t w;
    w     = WL_NONE;
    w.asr = a;
    return w;
  endfunction

  localparam asr_wl_t A_SX   = 8'b1000_0000;
  localparam asr_wl_t A_TX   = 8'b0100_0000;
  localparam asr_wl_t A_AX   = 8'b0010_0000;
  localparam asr_wl_t A_AP   = 8'b0001_0000;
  localparam asr_wl_t A_OX   = 8'b0000_1000;
  localparam asr_wl_t A_OP   = 8'b0000_0100;
  localparam asr_wl_t A_IX   = 8'b0000_0010;
  localparam asr_wl_t A_IP   = 8'b0000_0001;

  function automatic phase_t copy_ph(input wl_t s, input wl_t d);
    phase_t p;
    p.pulse = 1'b0;
    p.src   = s;
    p.dst   = d;
    return p;
  endfunction

  function automatic phase_t pulse_ph(input asr_wl_t a);
    phase_t p;
    p.pulse = 1'b1;
    p.src   = asr_only(a);
    p.dst   = WL_NONE;
    return p;
  endfunction

  // Number of steps of each row operation.
  function automatic int unsigned rop_phases(input rop_e op);
    case (op)
      ROP_RCP, ROP_RIV:          return 1;
      ROP_RAN, ROP_ROR:          return 3;
      ROP_RXR:                   return 11;
      default:                   return 2;   // RCL, RST
    endcase
  endfunction

  // Step k of row operation (op, a, b).
  function automatic phase_t rop_phase(input rop_e op, input row_t a, input row_t b,
                                       input int unsigned k);
    wl_t wa, wb;
    phase_t p;
    wa = row_wl(a);
    wb = row_wl(b);
    p  = copy_ph(WL_NONE, WL_NONE);
    case (op)
      ROP_RCP: p = copy_ph(wa, wb);
      ROP_RIV: p = copy_ph(wa, asr_only(A_IP));
      ROP_RAN, ROP_ROR: begin
        case (k)
          0:       p = copy_ph(wa, asr_only(A_SX));
          1:       p = copy_ph(wb, asr_only(A_TX | ((op == ROP_RAN) ? A_AP : A_OP)));
          default: p = copy_ph(asr_only(A_SX | A_TX | ((op == ROP_RAN) ? A_AX : A_OX)), WL_NONE);
        endcase
      end
      ROP_RXR: begin
        case (k)
          0:       p = copy_ph(wa, asr_only(A_IP));                   // IR <- ~a
          1:       p = copy_ph(asr_only(A_IX), asr_only(A_SX));       // SR <- IR
          2:       p = copy_ph(wb, asr_only(A_TX | A_AP));            // TR <- b, AR <- 0
          3:       p = copy_ph(asr_only(A_SX | A_TX | A_AX), WL_NONE);// ~a & b
          4:       p = copy_ph(asr_only(A_AX), asr_only(A_OX));       // OR <- AR
          5:       p = copy_ph(wb, asr_only(A_IP));                   // IR <- ~b
          6:       p = copy_ph(asr_only(A_IX), asr_only(A_SX));       // SR <- IR
          7:       p = copy_ph(wa, asr_only(A_TX | A_AP));            // TR <- a, AR <- 0
          8:       p = copy_ph(asr_only(A_SX | A_TX | A_AX), WL_NONE);// a & ~b
          9:       p = copy_ph(asr_only(A_OX), asr_only(A_TX | A_OP));// TR <- OR, OR <- 1
          default: p = copy_ph(asr_only(A_SX | A_TX | A_OX), WL_NONE);// OR of the two
        endcase
      end
      ROP_RCL: p = (k == 0) ? pulse_ph(A_AP) : copy_ph(asr_only(A_AX), wa);
      default: p = (k == 0) ? pulse_ph(A_OP) : copy_ph(asr_only(A_OX), wa);  // RST
    endcase
    return p;
  endfunction

  // Commands of the host (memory-controller) port of the DRAM.
  typedef enum logic [3:0] {
    H_ACT   = 4'd0,  // open a row: raise its wordline and sense it
    H_RD    = 4'd1,  // read one I/O word of the open row
    H_WR    = 4'd2,  // write one I/O word of the open row
    H_PRE   = 4'd3,  // close the open row
    H_ROWOP = 4'd4,  // run one row operation inside a subarray
    H_ENC   = 4'd5,  // SIMON-encrypt a 32-row group
    H_DEC   = 4'd6,  // SIMON-decrypt a 32-row group
    H_KEY   = 4'd7   // load one round key of a bank's engine
  } host_op_e;

endpackage
