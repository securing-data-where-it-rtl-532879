// secbit_dram: DRAM device with a Secbit in-memory encryption engine in every bank.
//
// What it does: a 1 Gb DRAM (8 banks x 32 subarrays x 512 rows x 8192 bits, 8-bit data
// path) whose banks can run bitwise row operations and bit-sliced SIMON-32/64 on their
// own contents. Data never leaves the array to be encrypted: a whole 32-row group of a
// subarray, 8192 cipher blocks side by side, is encrypted in place by row copies,
// inversions, ANDs and ORs.
//
// How it works: each bank has a secbit_bank (the array), a secbit_rowop_ctrl (turns row
// operations into wordline/sense/precharge sequences) and a simon_bitslice_seq (the
// SIMON program and the bank's round keys). One host command port serves all banks:
// ordinary column traffic (H_ACT opens and senses a row, H_RD/H_WR move a byte, H_PRE
// closes it), single row operations (H_ROWOP), encryption or decryption of a row group
// (H_ENC/H_DEC) and round-key loading (H_KEY). A bank's array is driven by its engine
// while the engine is busy and by the host otherwise; a host command to a busy bank is
// held off (h_ready low) until the bank is free. Banks run their engines independently,
// so all eight can encrypt at once.
//
// Interface and timing: h_valid/h_ready handshake. h_row is the global row address
// {subarray ID, row inside subarray}; for H_ROWOP its subarray ID selects the subarray
// and the operands in h_rowop are rows inside it; for H_ENC/H_DEC its lower bits are the
// first row of the group. H_ACT holds the port for two cycles (activate, then sense).
// Read data returns on h_rdata with h_rvalid one cycle after the accepted H_RD.
// bank_done pulses when a bank's encryption or decryption has finished.
//
// From the source design: the bank/subarray organisation and sizes, the 8-bit data
// path, the row operations, the SIMON program and keeping keys in the engine. This
// design's own choices: the host command set and its encoding, the two-cycle activate,
// the per-bank key stores, and the way host and engine share a bank.
module secbit_dram
  import secbit_pkg::*;
#(
  parameter int unsigned NBANKS    = 8,
  parameter int unsigned NSUB      = 32,
  parameter int unsigned ROWS      = 512,
  parameter int unsigned COLS      = 8192,
  parameter int unsigned IO_W      = 8,
  parameter int unsigned T_RAS     = 3,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned WORD      = 16,
  parameter int unsigned ROUNDS    = 32,
  parameter int unsigned TEMP_BASE = 496,
  parameter int unsigned KEY_ROW   = 495,
  localparam int unsigned BAW = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned SAW = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned CAW = (COLS / IO_W > 1) ? $clog2(COLS / IO_W) : 1,
  localparam int unsigned RW  = $clog2(ROUNDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host command port
  input  logic                  h_valid,
  output logic                  h_ready,
  input  host_op_e              h_op,
  input  logic [BAW-1:0]        h_bank,
  input  logic [SAW+ROW_AW-1:0] h_row,     // {subarray ID, local row}
  input  logic [CAW-1:0]        h_col,
  input  logic [IO_W-1:0]       h_wdata,
  input  rowop_t                h_rowop,
  input  logic [RW-1:0]         h_key_idx,
  input  logic [WORD-1:0]       h_key,
  // read data
  output logic [IO_W-1:0]       h_rdata,
  output logic                  h_rvalid,
  // status
  output logic [NBANKS-1:0]     bank_busy,
  output logic [NBANKS-1:0]     bank_done
);

  logic [SAW-1:0]    h_sub;
  logic [ROW_AW-1:0] h_lrow;
  assign h_sub  = h_row[ROW_AW +: SAW];
  assign h_lrow = h_row[ROW_AW-1:0];

  logic [NBANKS-1:0] bank_ready;
  logic [IO_W-1:0]   bank_rdata [NBANKS];
  logic [BAW-1:0]    rd_bank_q;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic    sel, acc;
    logic    sense_pend_q;        // H_ACT accepted: sense next cycle
    logic [SAW-1:0] host_sub_q;   // subarray of the host's open row / pending sense
    logic [SAW-1:0] eng_sub_q;    // subarray the engine works in
    logic    seq_busy, ctrl_busy, ctrl_ready;
    logic    seq_valid, seq_done, ctrl_valid;
    rowop_t  seq_op, ctrl_op;
    sa_cmd_e ctrl_cmd, arr_cmd;
    wl_t     ctrl_wl, arr_wl;
    logic [SAW-1:0] arr_sub;

    assign sel = h_valid && (h_bank == BAW'(b));

    // when this bank can take the host's command
    always_comb begin
      bank_ready[b] = 1'b0;
      case (h_op)
        H_KEY:   bank_ready[b] = !seq_busy;
        H_ROWOP: bank_ready[b] = !seq_busy && ctrl_ready && !sense_pend_q;
        default: bank_ready[b] = !seq_busy && !ctrl_busy && !sense_pend_q;
      endcase
    end
    assign acc = sel && bank_ready[b];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        sense_pend_q <= 1'b0;
        host_sub_q   <= '0;
        eng_sub_q    <= '0;
      end else begin
        sense_pend_q <= acc && (h_op == H_ACT);
        if (acc && h_op == H_ACT) host_sub_q <= h_sub;
        if (acc && (h_op == H_ROWOP || h_op == H_ENC || h_op == H_DEC)) eng_sub_q <= h_sub;
      end
    end

    simon_bitslice_seq #(
      .WORD(WORD), .ROUNDS(ROUNDS), .TEMP_BASE(TEMP_BASE), .KEY_ROW(KEY_ROW)
    ) u_seq (
      .clk, .rst_n,
      .key_we    (acc && h_op == H_KEY),
      .key_idx   (h_key_idx),
      .key_word  (h_key),
      .start     (acc && (h_op == H_ENC || h_op == H_DEC)),
      .decrypt   (h_op == H_DEC),
      .base      (h_lrow),
      .busy      (seq_busy),
      .done      (seq_done),
      .op_valid  (seq_valid),
      .op_ready  (ctrl_ready),
      .op        (seq_op),
      .exec_busy (ctrl_busy)
    );

    assign ctrl_valid = seq_busy ? seq_valid : (acc && h_op == H_ROWOP);
    assign ctrl_op    = seq_busy ? seq_op : h_rowop;

    secbit_rowop_ctrl #(.T_RAS(T_RAS), .T_RP(T_RP)) u_ctrl (
      .clk, .rst_n,
      .op_valid (ctrl_valid),
      .op_ready (ctrl_ready),
      .op       (ctrl_op),
      .busy     (ctrl_busy),
      .sa_cmd   (ctrl_cmd),
      .sa_wl    (ctrl_wl)
    );

    // array command: engine, then pending sense, then the host's own command
    always_comb begin
      arr_cmd = SA_NOP;
      arr_wl  = WL_NONE;
      arr_sub = eng_sub_q;
      if (ctrl_busy) begin
        arr_cmd = ctrl_cmd;
        arr_wl  = ctrl_wl;
      end else if (sense_pend_q) begin
        arr_cmd = SA_SENSE;
        arr_sub = host_sub_q;
      end else if (acc) begin
        arr_sub = (h_op == H_ACT) ? h_sub : host_sub_q;
        case (h_op)
          H_ACT: begin
            arr_cmd = SA_ACT;
            arr_wl  = row_wl(rr_row(h_lrow));
          end
          H_RD:    arr_cmd = SA_RD;
          H_WR:    arr_cmd = SA_WR;
          H_PRE:   arr_cmd = SA_PRE;
          default: ;
        endcase
      end
    end

    secbit_bank #(.NSUB(NSUB), .ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) u_bank (
      .clk, .rst_n,
      .cmd   (arr_cmd),
      .sub   (arr_sub),
      .wl    (arr_wl),
      .col   (h_col),
      .wdata (h_wdata),
      .rdata (bank_rdata[b])
    );

    assign bank_busy[b] = seq_busy || ctrl_busy;
    assign bank_done[b] = seq_done;
  end

  assign h_ready = bank_ready[h_bank];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_rvalid  <= 1'b0;
      rd_bank_q <= '0;
    end else begin
      h_rvalid <= h_valid && h_ready && (h_op == H_RD);
      if (h_valid && h_ready && h_op == H_RD) rd_bank_q <= h_bank;
    end
  end

  assign h_rdata = bank_rdata[rd_bank_q];

  a_bank_range: assert property (@(posedge clk) disable iff (!rst_n)
    h_valid |-> (32'(h_bank) < NBANKS));

endmodule
