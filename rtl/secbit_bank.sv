// secbit_bank: one DRAM bank built from NSUB Secbit subarrays.
//
// What it does: a bank of NSUB * ROWS rows (default 32 x 512 = 16384 rows of 8192 bits,
// 128 Mb). A global row address splits into a subarray ID (upper bits) and a row inside
// the subarray (lower bits). Each subarray compares the ID with its own number and only
// the matching one acts on a command, so only one subarray is active at a time and the
// Secbit row operations stay inside that subarray.
//
// How it works: the command, wordline set, column and write data go to every subarray;
// the ID compare gates the command into a NOP everywhere else. Column reads come back
// through the shared (global) data path: the ID of the last read selects which
// subarray's read register drives rdata.
//
// Interface and timing: one command per clock, as for secbit_subarray; rdata is valid
// the cycle after SA_RD. From the source design: the subarray/ID-compare organisation,
// 32 subarrays per bank and the sizes. The command encoding and the read mux are this
// design's own.
module secbit_bank
  import secbit_pkg::*;
#(
  parameter int unsigned NSUB = 32,     // subarrays per bank
  parameter int unsigned ROWS = 512,    // rows per subarray
  parameter int unsigned COLS = 8192,   // bits per row
  parameter int unsigned IO_W = 8,      // bits per column access
  localparam int unsigned SAW = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned CAW = (COLS / IO_W > 1) ? $clog2(COLS / IO_W) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  sa_cmd_e         cmd,
  input  logic [SAW-1:0]  sub,     // subarray ID
  input  wl_t             wl,      // wordlines inside that subarray
  input  logic [CAW-1:0]  col,
  input  logic [IO_W-1:0] wdata,
  output logic [IO_W-1:0] rdata
);

  logic [IO_W-1:0] sub_rdata [NSUB];
  logic [SAW-1:0]  rd_sub_q;

  for (genvar g = 0; g < NSUB; g++) begin : g_sub
    sa_cmd_e cmd_g;
    assign cmd_g = (sub == SAW'(g)) ? cmd : SA_NOP;   // subarray ID compare
    secbit_subarray #(.ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) u_sub (
      .clk, .rst_n,
      .cmd   (cmd_g),
      .wl,
      .col,
      .wdata,
      .rdata (sub_rdata[g])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)             rd_sub_q <= '0;
    else if (cmd == SA_RD)  rd_sub_q <= sub;
  end

  assign rdata = sub_rdata[rd_sub_q];

  a_sub_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd != SA_NOP) |-> (32'(sub) < NSUB));

endmodule
