// tb_secbit_subarray: self-checking test of the subarray's primitive commands.
//
// Drives activate/sense/precharge/column commands by hand, on a 16-row x 64-bit subarray,
// and checks: column write and read-back; row copy between regular rows; inversion
// through IP; AND and OR by triple-row activation with AR cleared by AP and OR set by OP
// (result present in SR, TR and AR/OR); majority of three arbitrary rows; and that an
// unrelated row keeps its contents. Expected values come from the testbench's own copy
// of the row data.
`timescale 1ns/1ps
module tb_secbit_subarray;
  import secbit_pkg::*;

  localparam int unsigned ROWS = 16, COLS = 64, IO_W = 8, NW = COLS / IO_W;

  logic clk = 1'b0, rst_n = 1'b0;
  sa_cmd_e cmd;
  wl_t wl;
  logic [$clog2(NW)-1:0] col;
  logic [IO_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  secbit_subarray #(.ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input sa_cmd_e c, input wl_t w = WL_NONE, input int cc = 0,
                       input logic [IO_W-1:0] d = '0);
    cmd = c; wl = w; col = cc[$clog2(NW)-1:0]; wdata = d;
    @(posedge clk); #1;
    cmd = SA_NOP; wl = WL_NONE;
  endtask

  task automatic write_row(input int r, input logic [COLS-1:0] v);
    issue(SA_ACT, row_wl(rr_row(ROW_AW'(r))));
    issue(SA_SENSE);
    for (int c = 0; c < NW; c++) issue(SA_WR, WL_NONE, c, v[c*IO_W +: IO_W]);
    issue(SA_PRE);
  endtask

  task automatic read_wl(input wl_t w, output logic [COLS-1:0] v);
    issue(SA_ACT, w);
    issue(SA_SENSE);
    for (int c = 0; c < NW; c++) begin
      issue(SA_RD, WL_NONE, c);
      v[c*IO_W +: IO_W] = rdata;
    end
    issue(SA_PRE);
  endtask

  task automatic read_row(input int r, output logic [COLS-1:0] v);
    read_wl(row_wl(rr_row(ROW_AW'(r))), v);
  endtask

  task automatic copy(input wl_t s, input wl_t d);
    issue(SA_ACT, s);
    issue(SA_SENSE);
    issue(SA_ACT, d);
    issue(SA_PRE);
  endtask

  task automatic check(input string what, input logic [COLS-1:0] got, input logic [COLS-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [COLS-1:0] rnd_row();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  logic [COLS-1:0] a, b, c, got;

  initial begin
    cmd = SA_NOP; wl = WL_NONE; col = '0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int it = 0; it < 4; it++) begin
      a = rnd_row(); b = rnd_row(); c = rnd_row();
      write_row(1, a); write_row(2, b); write_row(3, c); write_row(9, ~a);
      read_row(1, got); check("write/read row 1", got, a);
      read_row(2, got); check("write/read row 2", got, b);

      // row copy 1 -> 5
      copy(row_wl(rr_row(1)), row_wl(rr_row(5)));
      read_row(5, got); check("RCP row1->row5", got, a);
      read_row(1, got); check("RCP keeps source", got, a);

      // inversion: IR <- ~row2 through IP, then IR -> row 6
      copy(row_wl(rr_row(2)), asr_only(A_IP));
      copy(asr_only(A_IX), row_wl(rr_row(6)));
      read_row(6, got); check("RIV via IP", got, ~b);

      // AND: SR <- a, TR <- b with AR cleared, triple activation
      copy(row_wl(rr_row(1)), asr_only(A_SX));
      copy(row_wl(rr_row(2)), asr_only(A_TX | A_AP));
      issue(SA_ACT, asr_only(A_SX | A_TX | A_AX)); issue(SA_SENSE); issue(SA_PRE);
      read_wl(asr_only(A_AX), got); check("AND in AR", got, a & b);
      read_wl(asr_only(A_SX), got); check("AND in SR", got, a & b);
      read_wl(asr_only(A_TX), got); check("AND in TR", got, a & b);

      // OR: SR <- a, TR <- c with OR set, triple activation
      copy(row_wl(rr_row(1)), asr_only(A_SX));
      copy(row_wl(rr_row(3)), asr_only(A_TX | A_OP));
      issue(SA_ACT, asr_only(A_SX | A_TX | A_OX)); issue(SA_SENSE); issue(SA_PRE);
      read_wl(asr_only(A_OX), got); check("OR in OR row", got, a | c);

      // majority of three: SR=a, TR=b, AR=c
      copy(row_wl(rr_row(1)), asr_only(A_SX));
      copy(row_wl(rr_row(2)), asr_only(A_TX));
      copy(row_wl(rr_row(3)), asr_only(A_AX));
      issue(SA_ACT, asr_only(A_SX | A_TX | A_AX)); issue(SA_SENSE); issue(SA_PRE);
      read_wl(asr_only(A_AX), got); check("majority", got, (a & b) | (a & c) | (b & c));

      // AP alone clears AR, OP alone sets OR
      issue(SA_ACT, asr_only(A_AP)); issue(SA_PRE);
      read_wl(asr_only(A_AX), got); check("AP clears AR", got, '0);
      issue(SA_ACT, asr_only(A_OP)); issue(SA_PRE);
      read_wl(asr_only(A_OX), got); check("OP sets OR", got, '1);

      read_row(9, got); check("untouched row", got, ~a);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
