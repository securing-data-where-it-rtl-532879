// tb_secbit_bank: self-checking test of the bank's subarray selection and data path.
//
// A 4-subarray bank of 8 rows x 32 bits. The testbench writes different random data to
// the same local row of every subarray, reads every row back through the shared read
// path, and checks that a row operation sequence (copy) issued to one subarray changes
// only that subarray. Expected data is the testbench's own copy.
`timescale 1ns/1ps
module tb_secbit_bank;
  import secbit_pkg::*;

  localparam int unsigned NSUB = 4, ROWS = 8, COLS = 32, IO_W = 8, NW = COLS / IO_W;

  logic clk = 1'b0, rst_n = 1'b0;
  sa_cmd_e cmd;
  logic [1:0] sub;
  wl_t wl;
  logic [$clog2(NW)-1:0] col;
  logic [IO_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  secbit_bank #(.NSUB(NSUB), .ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input sa_cmd_e c, input int s, input wl_t w = WL_NONE, input int cc = 0,
                       input logic [IO_W-1:0] d = '0);
    cmd = c; sub = 2'(s); wl = w; col = cc[$clog2(NW)-1:0]; wdata = d;
    @(posedge clk); #1;
    cmd = SA_NOP; wl = WL_NONE;
  endtask

  task automatic write_row(input int s, input int r, input logic [COLS-1:0] v);
    issue(SA_ACT, s, row_wl(rr_row(ROW_AW'(r))));
    issue(SA_SENSE, s);
    for (int c = 0; c < NW; c++) issue(SA_WR, s, WL_NONE, c, v[c*IO_W +: IO_W]);
    issue(SA_PRE, s);
  endtask

  task automatic read_row(input int s, input int r, output logic [COLS-1:0] v);
    issue(SA_ACT, s, row_wl(rr_row(ROW_AW'(r))));
    issue(SA_SENSE, s);
    for (int c = 0; c < NW; c++) begin
      issue(SA_RD, s, WL_NONE, c);
      v[c*IO_W +: IO_W] = rdata;
    end
    issue(SA_PRE, s);
  endtask

  logic [COLS-1:0] ref_mem [NSUB][ROWS];
  logic [COLS-1:0] got;

  initial begin
    cmd = SA_NOP; sub = '0; wl = WL_NONE; col = '0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int s = 0; s < NSUB; s++)
      for (int r = 0; r < ROWS; r++) begin
        ref_mem[s][r] = $urandom();
        write_row(s, r, ref_mem[s][r]);
      end

    // copy row 1 -> row 5 in subarray 2 only
    issue(SA_ACT, 2, row_wl(rr_row(1)));
    issue(SA_SENSE, 2);
    issue(SA_NOP, 2);
    issue(SA_ACT, 2, row_wl(rr_row(5)));
    issue(SA_PRE, 2);
    ref_mem[2][5] = ref_mem[2][1];

    for (int s = 0; s < NSUB; s++)
      for (int r = 0; r < ROWS; r++) begin
        read_row(s, r, got);
        checks++;
        if (got !== ref_mem[s][r]) begin
          failures++;
          $display("FAIL sub %0d row %0d: got %h expected %h", s, r, got, ref_mem[s][r]);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
