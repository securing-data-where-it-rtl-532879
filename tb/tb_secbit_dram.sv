// tb_secbit_dram: end-to-end test of the DRAM with in-memory SIMON, at reduced size.
//
// Two banks of two 64-row subarrays with 32-bit rows (32 blocks per group) keep the run
// short; the cipher itself runs at full size (SIMON-32/64, 32 rounds). The same test
// sequence runs on full-size subarrays in tb_secbit_dram_mid.
//
// Sequence: load the round keys of two banks (bank 0: the published test key 1918 1110
// 0908 0100, the other bank a random key), store a 32-row group of plaintext in each
// through the column path, start both encryptions back to back so the banks run in
// parallel, try a column access to a busy bank (it must be held off), read back and
// compare every block with the word-level reference, decrypt bank 0 and compare with the
// plaintext, and run host row operations (XOR, then a copy of the result) back to back.
// The encryption length is checked against 173568 cycles of row operations plus 3.
// Each mechanism (column read/write, key load, encryption, decryption, parallel banks,
// host stall, host row operation) is counted and must have happened.
`timescale 1ns/1ps
module tb_secbit_dram;
  import secbit_pkg::*;
  import simon_ref_pkg::*;

  localparam int unsigned NBANKS = 2, NSUB = 2, ROWS = 64, COLS = 32, IO_W = 8;
  localparam int unsigned TEMP_BASE = 48, KEY_ROW = 47;
  localparam int unsigned BASE = 8, BANK_B = 1, SUB_B = 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  secbit_dram #(
    .NBANKS(NBANKS), .NSUB(NSUB), .ROWS(ROWS), .COLS(COLS), .IO_W(IO_W),
    .TEMP_BASE(TEMP_BASE), .KEY_ROW(KEY_ROW)
  ) dut (.*);


  localparam int unsigned NW = COLS / IO_W;
  localparam int unsigned EXP_CYC = 32 * 16 * ((3 + 8) + 24 + 4 * 8 + 3 * 88 + 8) + 3;
  localparam int unsigned BAW = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned SAW = (NSUB > 1) ? $clog2(NSUB) : 1;
  localparam int unsigned CAW = (NW > 1) ? $clog2(NW) : 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic h_valid, h_ready, h_rvalid;
  host_op_e h_op;
  logic [BAW-1:0] h_bank;
  logic [SAW+ROW_AW-1:0] h_row;
  logic [CAW-1:0] h_col;
  logic [IO_W-1:0] h_wdata, h_rdata;
  rowop_t h_rowop;
  logic [4:0] h_key_idx;
  logic [15:0] h_key;
  logic [NBANKS-1:0] bank_busy, bank_done;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;

  // ---- event counters -------------------------------------------------------------
  int unsigned n_wr = 0, n_rd = 0, n_key = 0, n_enc = 0, n_dec = 0, n_rowop = 0;
  int unsigned n_stall = 0, n_parallel = 0, n_done = 0;
  int unsigned start_cyc [NBANKS];
  int unsigned run_len [NBANKS];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (h_valid && !h_ready) n_stall++;
      if ($countones(bank_busy) >= 2) n_parallel++;
      if (h_valid && h_ready) begin
        case (h_op)
          H_WR:    n_wr++;
          H_RD:    n_rd++;
          H_KEY:   n_key++;
          H_ENC:   begin n_enc++; start_cyc[h_bank] = cyc; end
          H_DEC:   begin n_dec++; start_cyc[h_bank] = cyc; end
          H_ROWOP: n_rowop++;
          default: ;
        endcase
      end
      for (int b = 0; b < NBANKS; b++)
        if (bank_done[b]) begin
          n_done++;
          run_len[b] = cyc - start_cyc[b];
        end
    end
  end

  // ---- host port tasks ------------------------------------------------------------
  task automatic hcmd(input host_op_e op, input int bank, input int sub = 0, input int row = 0,
                      input int c = 0, input logic [IO_W-1:0] d = '0);
    h_valid = 1'b1; h_op = op; h_bank = BAW'(bank);
    h_row = {SAW'(sub), ROW_AW'(row)}; h_col = CAW'(c); h_wdata = d;
    do @(posedge clk); while (!h_ready);
    #1;
    h_valid = 1'b0;
  endtask

  task automatic write_row(input int bank, input int sub, input int row, input logic [COLS-1:0] v);
    hcmd(H_ACT, bank, sub, row);
    for (int c = 0; c < NW; c++) hcmd(H_WR, bank, sub, row, c, v[c*IO_W +: IO_W]);
    hcmd(H_PRE, bank, sub, row);
  endtask

  task automatic read_row(input int bank, input int sub, input int row, output logic [COLS-1:0] v);
    hcmd(H_ACT, bank, sub, row);
    for (int c = 0; c < NW; c++) begin
      hcmd(H_RD, bank, sub, row, c);
      v[c*IO_W +: IO_W] = h_rdata;
      checks++;
      if (!h_rvalid) begin
        failures++;
        $display("FAIL read data not flagged valid");
      end
    end
    hcmd(H_PRE, bank, sub, row);
  endtask

  task automatic load_keys(input int bank, input rk_t k);
    for (int i = 0; i < 32; i++) begin
      h_key_idx = 5'(i); h_key = k[i];
      hcmd(H_KEY, bank);
    end
  endtask

  task automatic store_blocks(input int bank, input int sub, input logic [31:0] blks [COLS]);
    logic [COLS-1:0] v;
    for (int r = 0; r < 32; r++) begin
      for (int c = 0; c < COLS; c++) v[c] = blks[c][31 - r];
      write_row(bank, sub, BASE + r, v);
    end
  endtask

  task automatic check_blocks(input string what, input int bank, input int sub,
                              input logic [31:0] exp [COLS]);
    logic [COLS-1:0] v;
    logic [31:0] got [COLS];
    int bad = 0;
    for (int r = 0; r < 32; r++) begin
      read_row(bank, sub, BASE + r, v);
      for (int c = 0; c < COLS; c++) got[c][31 - r] = v[c];
    end
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (got[c] !== exp[c]) begin
        failures++;
        if (bad++ < 5) $display("FAIL %s block %0d: got %h expected %h", what, c, got[c], exp[c]);
      end
    end
  endtask

  function automatic rowop_t mk(input rop_e o, input row_t a, input row_t b);
    rowop_t r;
    r.op = o; r.a = a; r.b = b;
    return r;
  endfunction

  task automatic check_count(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  rk_t rk0, rk1;
  logic [31:0] pt0 [COLS], pt1 [COLS], ct0 [COLS], ct1 [COLS];
  logic [COLS-1:0] xa, xb, got;

  initial begin
    h_valid = 1'b0; h_op = H_ACT; h_bank = '0; h_row = '0; h_col = '0; h_wdata = '0;
    h_rowop = '0; h_key_idx = '0; h_key = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    rk0 = key_schedule(64'h1918_1110_0908_0100);
    rk1 = key_schedule({$urandom(), $urandom()});
    for (int c = 0; c < COLS; c++) begin
      pt0[c] = (c == 0) ? 32'h6565_6877 : $urandom();
      pt1[c] = $urandom();
      ct0[c] = encrypt(pt0[c], rk0, 32);
      ct1[c] = encrypt(pt1[c], rk1, 32);
    end
    checks++;
    if (ct0[0] !== 32'hc69b_e9bb) begin
      failures++;
      $display("FAIL reference model does not give the published ciphertext");
    end

    load_keys(0, rk0);
    load_keys(BANK_B, rk1);
    store_blocks(0, 0, pt0);
    store_blocks(BANK_B, SUB_B, pt1);

    // both banks encrypt at once
    hcmd(H_ENC, 0, 0, BASE);
    hcmd(H_ENC, BANK_B, SUB_B, BASE);
    // a column access to a busy bank waits until the bank is free
    hcmd(H_ACT, 0, 0, BASE);
    checks++;
    if (bank_busy[0]) begin
      failures++;
      $display("FAIL host command accepted while bank 0 was busy");
    end
    hcmd(H_PRE, 0, 0, BASE);
    while (bank_busy[BANK_B]) @(posedge clk);
    #1;

    for (int b = 0; b < 2; b++) begin
      int unsigned bk;
      bk = (b == 0) ? 0 : BANK_B;
      checks++;
      if (run_len[bk] != EXP_CYC) begin
        failures++;
        $display("FAIL bank %0d encryption took %0d cycles, expected %0d", bk, run_len[bk], EXP_CYC);
      end
    end
    check_blocks("encrypt bank 0", 0, 0, ct0);
    check_blocks("encrypt bank B", BANK_B, SUB_B, ct1);

    // decryption restores the plaintext
    hcmd(H_DEC, 0, 0, BASE);
    while (bank_busy[0]) @(posedge clk);
    #1;
    checks++;
    if (run_len[0] != EXP_CYC) begin
      failures++;
      $display("FAIL decryption took %0d cycles, expected %0d", run_len[0], EXP_CYC);
    end
    check_blocks("decrypt bank 0", 0, 0, pt0);

    // host row operations, back to back: rows BASE, BASE+1 -> XOR -> row BASE+2
    for (int i = 0; i < COLS; i += 32) begin
      xa[i +: 32] = $urandom();
      xb[i +: 32] = $urandom();
    end
    write_row(BANK_B, SUB_B, BASE, xa);
    write_row(BANK_B, SUB_B, BASE + 1, xb);
    h_rowop = mk(ROP_RXR, rr_row(ROW_AW'(BASE)), rr_row(ROW_AW'(BASE + 1)));
    hcmd(H_ROWOP, BANK_B, SUB_B);
    h_rowop = mk(ROP_RCP, asr_row(ASR_OR), rr_row(ROW_AW'(BASE + 2)));
    hcmd(H_ROWOP, BANK_B, SUB_B);
    read_row(BANK_B, SUB_B, BASE + 2, got);
    checks++;
    if (got !== (xa ^ xb)) begin
      failures++;
      $display("FAIL host RXR: got %h expected %h", got, xa ^ xb);
    end

    check_count("column write", n_wr);
    check_count("column read", n_rd);
    check_count("round-key load", n_key);
    check_count("encryption", n_enc);
    check_count("decryption", n_dec);
    check_count("done", n_done);
    check_count("banks busy in parallel", n_parallel);
    check_count("host stalled by a busy bank", n_stall);
    check_count("host row operation", n_rowop);
    $display("events: wr=%0d rd=%0d key=%0d enc=%0d dec=%0d done=%0d parallel=%0d stall=%0d rowop=%0d",
             n_wr, n_rd, n_key, n_enc, n_dec, n_done, n_parallel, n_stall, n_rowop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
