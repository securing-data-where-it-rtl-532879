// simon_bitslice_seq: bit-sliced SIMON-32/64 program for the Secbit row engine.
//
// What it does: encrypts (or decrypts) a group of 2*WORD rows of a subarray with SIMON.
// The rows hold the cipher state bit-sliced: column c of the group is one 32-bit block,
// rows base+0 .. base+WORD-1 hold its left word and base+WORD .. base+2*WORD-1 its right
// word, most significant bit first. Every row operation therefore works on all COLS blocks
// of the group in parallel.
//
// How it works: a SIMON round is c_l = (S1(l) & S8(l)) ^ S2(l) ^ r ^ k, c_r = l. With the
// bits stored most significant first, a left rotation by j is only a change of row index:
// bit i of (l <<< j) is row (i + j) mod WORD. For each output bit i the program issues
//   RCL/RST K            key row <- key bit (every 0 or 1 row costs the same time)
//   RAN  L(i+1), L(i+8)  ; RCP AR  -> T_i
//   RXR  T_i, L(i+2)     ; RCP OR  -> T_i
//   RXR  T_i, R(i)       ; RCP OR  -> T_i
//   RXR  T_i, K          ; RCP OR  -> T_i
// and, once all WORD bits are done, copies T_0..T_{WORD-1} over the right word. The new
// left word then sits where the right word was, so the next round swaps the roles of the
// two row halves; after an even number of rounds the words are back in place. Decryption
// runs the same program with the halves swapped and the round keys reversed, which
// inverts a Feistel cipher.
//
// The round keys are held inside the engine (ROUNDS words, written through key_we) and
// only ever reach the array as all-zero or all-one rows. The SIMON key schedule is not
// part of this block: the round keys are loaded precomputed.
//
// Interface and timing: start (one cycle, while !busy) latches base and decrypt; the
// block issues row operations on op_valid/op_ready and pulses done once the last one has
// finished in the row controller (exec_busy low). Per output bit it issues nine
// operations, per round 9*WORD + WORD. From the source design: the row layout, the
// per-bit operation sequence, WORD = 16 and ROUNDS = 32, the temporary rows and keeping
// the key in the engine with constant-time RCL/RST. This design's own choices: the
// position of the temporary rows and of the single key row (defaults: the top 16 rows of
// a 512-row subarray and the row below them), and the decryption mode.
module simon_bitslice_seq
  import secbit_pkg::*;
#(
  parameter int unsigned WORD      = 16,    // SIMON word size n
  parameter int unsigned ROUNDS    = 32,    // SIMON-32/64 rounds
  parameter int unsigned TEMP_BASE = 496,   // first of WORD temporary rows
  parameter int unsigned KEY_ROW   = 495,   // row that carries one key bit at a time
  localparam int unsigned RW = $clog2(ROUNDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // round-key store
  input  logic              key_we,
  input  logic [RW-1:0]     key_idx,
  input  logic [WORD-1:0]   key_word,
  // job control
  input  logic              start,
  input  logic              decrypt,
  input  logic [ROW_AW-1:0] base,      // first row of the 2*WORD-row group
  output logic              busy,
  output logic              done,
  // row operations out
  output logic              op_valid,
  input  logic              op_ready,
  output rowop_t            op,
  input  logic              exec_busy  // row controller still executing
);

  localparam int unsigned WW = $clog2(WORD);
  localparam int unsigned NSTEP = 9;

  typedef enum logic [1:0] {S_IDLE, S_COMPUTE, S_COPY, S_WAIT} state_e;

  logic [WORD-1:0]   keys_q [ROUNDS];
  state_e            st_q;
  logic [RW-1:0]     rnd_q;
  logic [WW-1:0]     i_q;
  logic [3:0]        s_q;
  logic              dec_q;
  logic [ROW_AW-1:0] base_q;

  // current round: which half is the left word, which key
  logic [ROW_AW-1:0] lbase, rbase;
  logic [RW-1:0]     kidx;
  logic              kbit;

  function automatic row_t lrow(input logic [ROW_AW-1:0] b, input logic [WW-1:0] i,
                                input int unsigned j);
    return rr_row(b + ROW_AW'((32'(i) + j) % WORD));
  endfunction

  always_comb begin
    lbase = (rnd_q[0] ^ dec_q) ? base_q + ROW_AW'(WORD) : base_q;
    rbase = (rnd_q[0] ^ dec_q) ? base_q : base_q + ROW_AW'(WORD);
    kidx  = dec_q ? RW'(ROUNDS - 1) - rnd_q : rnd_q;
    kbit  = keys_q[kidx][WORD - 1 - 32'(i_q)];
  end

  // the operation of the current program step
  always_comb begin
    row_t t, k;
    t = rr_row(ROW_AW'(TEMP_BASE) + ROW_AW'(i_q));
    k = rr_row(ROW_AW'(KEY_ROW));
    op.op = ROP_RCP;
    op.a  = t;
    op.b  = rr_row(rbase + ROW_AW'(i_q));        // copy-back: T_i -> right word
    if (st_q == S_COMPUTE) begin
      case (s_q)
        4'd0: begin op.op = kbit ? ROP_RST : ROP_RCL; op.a = k; op.b = k; end
        4'd1: begin op.op = ROP_RAN; op.a = lrow(lbase, i_q, 1); op.b = lrow(lbase, i_q, 8); end
        4'd2: begin op.op = ROP_RCP; op.a = asr_row(ASR_AR); op.b = t; end
        4'd3: begin op.op = ROP_RXR; op.a = t; op.b = lrow(lbase, i_q, 2); end
        4'd5: begin op.op = ROP_RXR; op.a = t; op.b = rr_row(rbase + ROW_AW'(i_q)); end
        4'd7: begin op.op = ROP_RXR; op.a = t; op.b = k; end
        default: begin op.op = ROP_RCP; op.a = asr_row(ASR_OR); op.b = t; end  // 4, 6, 8
      endcase
    end
  end

  assign op_valid = (st_q == S_COMPUTE) || (st_q == S_COPY);
  assign busy     = (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (key_we) keys_q[key_idx] <= key_word;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q   <= S_IDLE;
      rnd_q  <= '0;
      i_q    <= '0;
      s_q    <= '0;
      dec_q  <= 1'b0;
      base_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st_q)
        S_IDLE: if (start) begin
          st_q   <= S_COMPUTE;
          rnd_q  <= '0;
          i_q    <= '0;
          s_q    <= '0;
          dec_q  <= decrypt;
          base_q <= base;
        end
        S_COMPUTE: if (op_ready) begin
          if (s_q == 4'(NSTEP - 1)) begin
            s_q <= '0;
            if (i_q == WW'(WORD - 1)) begin
              i_q  <= '0;
              st_q <= S_COPY;
            end else begin
              i_q <= i_q + 1'b1;
            end
          end else begin
            s_q <= s_q + 1'b1;
          end
        end
        S_COPY: if (op_ready) begin
          if (i_q == WW'(WORD - 1)) begin
            i_q <= '0;
            if (rnd_q == RW'(ROUNDS - 1)) begin
              st_q <= S_WAIT;
            end else begin
              rnd_q <= rnd_q + 1'b1;
              st_q  <= S_COMPUTE;
            end
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        default: if (!exec_busy) begin   // S_WAIT
          st_q <= S_IDLE;
          done <= 1'b1;
        end
      endcase
    end
  end

  initial begin
    assert (ROUNDS % 2 == 0) else $error("ROUNDS must be even so the words end in place");
    assert ((1 << WW) == WORD) else $error("WORD must be a power of two");
    assert (TEMP_BASE + WORD <= (1 << ROW_AW)) else $error("temporary rows out of range");
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
