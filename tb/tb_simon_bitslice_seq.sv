// tb_simon_bitslice_seq: SIMON-32/64 run as a bit-sliced row program.
//
// The SIMON program drives the row controller, which drives a 64-row x 32-bit subarray:
// 32 blocks are encrypted side by side. Column 0 holds the published test vector
// (key 1918 1110 0908 0100, plaintext 6565 6877, ciphertext c69b e9bb), the other
// columns random blocks. The testbench loads the bit-sliced rows through the column
// path, loads the 32 round keys computed by its own key schedule, runs all 32 rounds,
// reads the rows back and compares every block with the word-level reference; then it
// decrypts and checks that the plaintext returns. The run length is checked against
// ROUNDS * WORD * (11 + 24 + 4*8 + 3*88 + 8) = 173568 cycles of row operations plus three:
// one from start to the first operation, one for the row controller to go idle after its
// last cycle, and one for the registered done.
`timescale 1ns/1ps
module tb_simon_bitslice_seq;
  import secbit_pkg::*;
  import simon_ref_pkg::*;

  localparam int unsigned ROWS = 64, COLS = 32, IO_W = 8, NW = COLS / IO_W;
  localparam int unsigned WORD = 16, ROUNDS = 32, TEMP_BASE = 48, KEY_ROW = 47;
  localparam int unsigned BASE = 8;
  localparam int unsigned EXP_CYC = ROUNDS * WORD * ((3 + 8) + 24 + 4 * 8 + 3 * 88 + 8) + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic key_we, start, decrypt, busy, done, op_valid, op_ready, ctrl_busy;
  logic [4:0] key_idx;
  logic [15:0] key_word;
  rowop_t op;
  sa_cmd_e ctrl_cmd, tb_cmd, cmd;
  wl_t ctrl_wl, tb_wl, wl;
  logic [$clog2(NW)-1:0] col;
  logic [IO_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  simon_bitslice_seq #(.WORD(WORD), .ROUNDS(ROUNDS), .TEMP_BASE(TEMP_BASE), .KEY_ROW(KEY_ROW)) dut (
    .clk, .rst_n, .key_we, .key_idx, .key_word, .start, .decrypt,
    .base(ROW_AW'(BASE)), .busy, .done, .op_valid, .op_ready, .op, .exec_busy(ctrl_busy));

  secbit_rowop_ctrl u_ctrl (
    .clk, .rst_n, .op_valid, .op_ready, .op, .busy(ctrl_busy), .sa_cmd(ctrl_cmd), .sa_wl(ctrl_wl));

  assign cmd = ctrl_busy ? ctrl_cmd : tb_cmd;
  assign wl  = ctrl_busy ? ctrl_wl  : tb_wl;

  secbit_subarray #(.ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) u_sub (
    .clk, .rst_n, .cmd, .wl, .col, .wdata, .rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input sa_cmd_e c, input wl_t w = WL_NONE, input int cc = 0,
                       input logic [IO_W-1:0] d = '0);
    tb_cmd = c; tb_wl = w; col = cc[$clog2(NW)-1:0]; wdata = d;
    @(posedge clk); #1;
    tb_cmd = SA_NOP; tb_wl = WL_NONE;
  endtask

  task automatic write_row(input int r, input logic [COLS-1:0] v);
    issue(SA_ACT, row_wl(rr_row(ROW_AW'(r))));
    issue(SA_SENSE);
    for (int c = 0; c < NW; c++) issue(SA_WR, WL_NONE, c, v[c*IO_W +: IO_W]);
    issue(SA_PRE);
  endtask

  task automatic read_row(input int r, output logic [COLS-1:0] v);
    issue(SA_ACT, row_wl(rr_row(ROW_AW'(r))));
    issue(SA_SENSE);
    for (int c = 0; c < NW; c++) begin
      issue(SA_RD, WL_NONE, c);
      v[c*IO_W +: IO_W] = rdata;
    end
    issue(SA_PRE);
  endtask

  // blocks <-> bit-sliced rows: row BASE+i holds bit 15-i of the left word,
  // row BASE+16+i bit 15-i of the right word, one block per column
  logic [31:0] blk [COLS];
  logic [31:0] pt [COLS];
  logic [31:0] ct_ref [COLS];

  task automatic store_blocks();
    logic [COLS-1:0] v;
    for (int r = 0; r < 32; r++) begin
      for (int c = 0; c < COLS; c++) v[c] = blk[c][31 - r];
      write_row(BASE + r, v);
    end
  endtask

  task automatic load_blocks();
    logic [COLS-1:0] v;
    for (int r = 0; r < 32; r++) begin
      read_row(BASE + r, v);
      for (int c = 0; c < COLS; c++) blk[c][31 - r] = v[c];
    end
  endtask

  task automatic run(input logic dec, output int unsigned cycles);
    int unsigned t0;
    decrypt = dec;
    start = 1'b1;
    @(posedge clk); t0 = cyc; #1;
    start = 1'b0;
    do @(posedge clk); while (!done);
    cycles = cyc - t0;
    #1;
  endtask

  rk_t rk;
  int unsigned ncyc;

  initial begin
    key_we = 0; key_idx = 0; key_word = 0; start = 0; decrypt = 0;
    tb_cmd = SA_NOP; tb_wl = WL_NONE; col = '0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    rk = key_schedule(64'h1918_1110_0908_0100);
    checks++;
    if (encrypt(32'h6565_6877, rk, 32) !== 32'hc69b_e9bb) begin
      failures++;
      $display("FAIL reference model does not give the published ciphertext");
    end

    for (int k = 0; k < 32; k++) begin
      key_we = 1; key_idx = 5'(k); key_word = rk[k];
      @(posedge clk); #1;
    end
    key_we = 0;

    pt[0] = 32'h6565_6877;
    for (int c = 1; c < COLS; c++) pt[c] = $urandom();
    for (int c = 0; c < COLS; c++) begin
      blk[c] = pt[c];
      ct_ref[c] = encrypt(pt[c], rk, ROUNDS);
    end
    store_blocks();

    run(1'b0, ncyc);
    checks++;
    if (ncyc != EXP_CYC) begin
      failures++;
      $display("FAIL encryption took %0d cycles, expected %0d", ncyc, EXP_CYC);
    end
    load_blocks();
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (blk[c] !== ct_ref[c]) begin
        failures++;
        $display("FAIL block %0d: got %h expected %h", c, blk[c], ct_ref[c]);
      end
    end
    checks++;
    if (blk[0] !== 32'hc69b_e9bb) begin
      failures++;
      $display("FAIL test vector: got %h", blk[0]);
    end

    run(1'b1, ncyc);
    checks++;
    if (ncyc != EXP_CYC) begin
      failures++;
      $display("FAIL decryption took %0d cycles, expected %0d", ncyc, EXP_CYC);
    end
    load_blocks();
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (blk[c] !== pt[c]) begin
        failures++;
        $display("FAIL decrypted block %0d: got %h expected %h", c, blk[c], pt[c]);
      end
    end

    $display("encryption of %0d blocks: %0d cycles", COLS, ncyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
