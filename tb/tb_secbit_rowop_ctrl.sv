// tb_secbit_rowop_ctrl: self-checking test of the row-operation controller.
//
// The controller drives a 16-row x 64-bit subarray. The testbench loads random rows
// through the column path, runs every row operation (RCP, RIV, RAN, ROR, RXR, RCL, RST)
// on regular rows and ASRs, reads the results back and compares them with the bitwise
// result computed here. It also measures each operation's length, accept to accept with
// operations issued back to back, against 2*tRAS + tRP per step: 8 cycles for RCP/RIV,
// 24 for RAN/ROR, 88 for RXR and tRAS + 8 = 11 for RCL/RST.
`timescale 1ns/1ps
module tb_secbit_rowop_ctrl;
  import secbit_pkg::*;

  localparam int unsigned ROWS = 16, COLS = 64, IO_W = 8, NW = COLS / IO_W;
  localparam int unsigned T_RAS = 3, T_RP = 2, STEP = 2 * T_RAS + T_RP;

  logic clk = 1'b0, rst_n = 1'b0;
  logic op_valid, op_ready, busy;
  rowop_t op;
  sa_cmd_e ctrl_cmd, tb_cmd, cmd;
  wl_t ctrl_wl, tb_wl, wl;
  logic [$clog2(NW)-1:0] col;
  logic [IO_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  secbit_rowop_ctrl #(.T_RAS(T_RAS), .T_RP(T_RP)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op, .busy, .sa_cmd(ctrl_cmd), .sa_wl(ctrl_wl));

  assign cmd = busy ? ctrl_cmd : tb_cmd;
  assign wl  = busy ? ctrl_wl  : tb_wl;

  secbit_subarray #(.ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) u_sub (
    .clk, .rst_n, .cmd, .wl, .col, .wdata, .rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic read_row(input row_t r, output logic [COLS-1:0] v);
    issue(SA_ACT, row_wl(r));
    issue(SA_SENSE);
    for (int c = 0; c < NW; c++) begin
      issue(SA_RD, WL_NONE, c);
      v[c*IO_W +: IO_W] = rdata;
    end
    issue(SA_PRE);
  endtask

  // issue a list of operations back to back; record the accept cycle of each
  int unsigned acc_cyc [16];
  int unsigned end_cyc;
  task automatic run_ops(input rowop_t ops [], output int unsigned lens []);
    lens = new[ops.size()];
    foreach (ops[k]) begin
      op = ops[k];
      op_valid = 1'b1;
      do @(posedge clk); while (!op_ready);
      acc_cyc[k] = cyc;
      #1;
    end
    op_valid = 1'b0;
    @(posedge clk);
    while (busy || !op_ready) @(posedge clk);
    end_cyc = cyc;
    #1;
    foreach (ops[k]) lens[k] = ((k + 1 < ops.size()) ? acc_cyc[k+1] : end_cyc) - acc_cyc[k];
  endtask

  task automatic check(input string what, input logic [COLS-1:0] got, input logic [COLS-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_len(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s length: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic rowop_t mk(input rop_e o, input row_t a, input row_t b);
    rowop_t r;
    r.op = o; r.a = a; r.b = b;
    return r;
  endfunction

  function automatic logic [COLS-1:0] rnd_row();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  logic [COLS-1:0] a, b, got;
  int unsigned lens [];
  rowop_t ops [];

  initial begin
    op_valid = 1'b0; op = '0; tb_cmd = SA_NOP; tb_wl = WL_NONE; col = '0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int it = 0; it < 3; it++) begin
      a = rnd_row(); b = rnd_row();
      write_row(0, a); write_row(1, b);

      // copy, invert, and: results saved into rows 2..4
      ops = new[7];
      ops[0] = mk(ROP_RCP, rr_row(0), rr_row(2));
      ops[1] = mk(ROP_RIV, rr_row(1), '0);
      ops[2] = mk(ROP_RCP, asr_row(ASR_IR), rr_row(3));
      ops[3] = mk(ROP_RAN, rr_row(0), rr_row(1));
      ops[4] = mk(ROP_RCP, asr_row(ASR_AR), rr_row(4));
      ops[5] = mk(ROP_ROR, rr_row(0), rr_row(1));
      ops[6] = mk(ROP_RCP, asr_row(ASR_OR), rr_row(8));   // follows ROR back to back
      run_ops(ops, lens);
      check_len("RCP", lens[0], STEP);
      check_len("RIV", lens[1], STEP);
      check_len("RAN", lens[3], 3 * STEP);
      check_len("ROR", lens[5], 3 * STEP);
      read_row(rr_row(2), got); check("RCP", got, a);
      read_row(rr_row(3), got); check("RIV", got, ~b);
      read_row(rr_row(4), got); check("RAN", got, a & b);
      read_row(asr_row(ASR_OR), got); check("ROR in OR", got, a | b);
      read_row(asr_row(ASR_SR), got); check("ROR in SR", got, a | b);
      read_row(rr_row(8), got); check("copy of OR row", got, a | b);

      // xor, clear, set
      ops = new[5];
      ops[0] = mk(ROP_RXR, rr_row(0), rr_row(1));
      ops[1] = mk(ROP_RCP, asr_row(ASR_OR), rr_row(5));
      ops[2] = mk(ROP_RCL, rr_row(6), '0);
      ops[3] = mk(ROP_RST, rr_row(7), '0);
      ops[4] = mk(ROP_RXR, rr_row(5), rr_row(7));
      run_ops(ops, lens);
      check_len("RXR", lens[0], 11 * STEP);
      check_len("RCL", lens[2], T_RAS + STEP);
      check_len("RST", lens[3], T_RAS + STEP);
      read_row(rr_row(5), got); check("RXR", got, a ^ b);
      read_row(rr_row(6), got); check("RCL", got, '0);
      read_row(rr_row(7), got); check("RST", got, '1);
      read_row(asr_row(ASR_OR), got); check("RXR with ones", got, ~(a ^ b));
      read_row(rr_row(0), got); check("RXR keeps source a", got, a);
      read_row(rr_row(1), got); check("RXR keeps source b", got, b);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
