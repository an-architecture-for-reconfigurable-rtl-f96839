// Iterative (non-pipelined) DES block cipher: one round per clock.
//
// A 'start' pulse while the core is idle captures the 64-bit block (after the
// initial permutation) and the 56 key bits selected by PC-1. Sixteen round
// cycles follow; the last one writes the final permutation of R16||L16 into
// 'dout' and raises 'done' for one cycle. A block therefore takes 17 clock
// cycles from the edge that samples 'start' to the edge that makes 'dout'
// valid, the figure given for the coprocessor's DES core. 'dout' holds its
// value until the next block completes, and 'key'/'din' are only read at
// 'start', so the next block and key can be prepared while a block runs.
// A 'start' while busy is ignored (the coprocessor interlocks instead).
//
// The key schedule is computed on the fly. DECRYPT=1 runs the schedule
// backwards (right rotations, no rotation before the first round), which
// produces the subkeys K16..K1 for decryption. The DES algorithm itself is
// the standard one; the round-per-cycle structure, the start/done handshake
// and the parameterised direction are this implementation's choices.
module des_core
  import des_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic        busy,
  output logic        done,
  output logic [63:0] dout
);

  logic [31:0] l_q, r_q;
  logic [27:0] c_q, d_q;
  logic [3:0]  round_q;

  logic [27:0] c_n, d_n;
  logic [47:0] subkey;
  logic [31:0] r_n;

  always_comb begin
    if (DECRYPT) begin
      c_n = ror28(c_q, (round_q == 4'd0) ? 2'd0 : SHIFT_T[16 - int'(round_q)]);
      d_n = ror28(d_q, (round_q == 4'd0) ? 2'd0 : SHIFT_T[16 - int'(round_q)]);
    end else begin
      c_n = rol28(c_q, SHIFT_T[round_q]);
      d_n = rol28(d_q, SHIFT_T[round_q]);
    end
    subkey = des_pc2({c_n, d_n});
    r_n    = l_q ^ des_f(r_q, subkey);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      dout    <= '0;
      l_q     <= '0;
      r_q     <= '0;
      c_q     <= '0;
      d_q     <= '0;
      round_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          {l_q, r_q} <= des_ip(din);
          {c_q, d_q} <= des_pc1(key);
          round_q    <= '0;
          busy       <= 1'b1;
        end
      end else begin
        l_q     <= r_q;
        r_q     <= r_n;
        c_q     <= c_n;
        d_q     <= d_n;
        round_q <= round_q + 4'd1;
        if (round_q == 4'd15) begin
          dout <= des_fp({r_n, r_q});
          done <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end

endmodule
