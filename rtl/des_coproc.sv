// DES coprocessor for one Leon3 core: an encryption core and a decryption
// core (both des_core, 17 cycles per 64-bit block) behind the coprocessor
// pipeline (cp_pipe).
//
// Programmer's view (this design's own instruction set, in the suggested
// coprocessor format op|rd|op3|rs1|opc|rs2):
//   register rd  LDC/LDDC writes          STC/STDC reads
//   0, 1         key, high / low word     key
//   2, 3         data block, high / low   data block
//   4, 5         -                        last encryption result
//   6, 7         -                        last decryption result
//   CPOP1 opc=1  start encrypting the data block with the key
//   CPOP1 opc=2  start decrypting the data block with the key
//   CPOP1 other opc, CPOP2: unimplemented -> coprocessor exception
//   STCSR        {exc, 25'b0, q_valid, dec_busy, enc_busy, 3'b0}
//   LDCSR        bit 31 = 1 clears a pending exception
//   STDCQ        deferred-trap queue: address, then word, of the
//                instruction that raised the exception (empties the queue)
//   cc           {dec_busy, enc_busy}, for CBccc polling
// Key and data registers are copied into a core when it starts, so the
// next block can be loaded while a block is being ciphered.
//
// Interlocks: a store in register access is held back (ldlock) while an
// older load or CPOP is in execute or memory, because stores read their
// register in execute and loads/CPOPs take effect at the end of the
// exception stage. A store of a result of a busy core, or a CPOP that would
// start a busy core, stalls the processor (holdn low) until the core is
// done; the cores do not depend on holdn, so this always ends. 'ccv' is low
// while a CPOP is in flight in the pipeline. 'exc' stays high from an
// unimplemented CPOP until 'exack'.
module des_coproc
  import cp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cp_in_t  cpi,
  output cp_out_t cpo
);

  localparam logic [8:0] OPC_ENC = 9'd1;
  localparam logic [8:0] OPC_DEC = 9'd2;

  cp_stage_info_t a_info, e_info, m_info, x_info;
  logic           x_fire;
  logic [31:0]    x_lddata;
  logic [31:0]    st_word;
  logic           lock_req, hold_req, ccv;

  logic [31:0] key_hi, key_lo, dat_hi, dat_lo;
  logic        exc_q, q_valid;
  logic [31:0] q_pc, q_inst;

  logic        enc_start, dec_start, enc_busy, dec_busy, enc_done, dec_done;
  logic [63:0] enc_out, dec_out;

  cp_pipe u_pipe (
    .clk, .rst_n, .cpi, .cpo,
    .a_info, .e_info, .m_info, .x_info, .x_fire, .x_lddata,
    .st_word, .lock_req, .hold_req,
    .exc(exc_q), .cc({dec_busy, enc_busy}), .ccv
  );

  des_core #(.DECRYPT(1'b0)) u_enc (
    .clk, .rst_n, .start(enc_start), .key({key_hi, key_lo}), .din({dat_hi, dat_lo}),
    .busy(enc_busy), .done(enc_done), .dout(enc_out)
  );

  des_core #(.DECRYPT(1'b1)) u_dec (
    .clk, .rst_n, .start(dec_start), .key({key_hi, key_lo}), .din({dat_hi, dat_lo}),
    .busy(dec_busy), .done(dec_done), .dout(dec_out)
  );

  // register index of a (possibly double) transfer
  function automatic logic [4:0] reg_idx(cp_stage_info_t s);
    return (s.op inside {CP_LDDC, CP_STDC}) ? {s.rd[4:1], s.cnt[0]} : s.rd;
  endfunction

  function automatic logic is_cpop_op(cp_stage_info_t s, logic [8:0] opc);
    return s.valid && s.op == CP_CPOP1 && s.opc == opc;
  endfunction

  // store data, read in the execute stage
  always_comb begin
    st_word = '0;
    unique case (e_info.op)
      CP_STC, CP_STDC: begin
        unique case (reg_idx(e_info))
          5'd0:    st_word = key_hi;
          5'd1:    st_word = key_lo;
          5'd2:    st_word = dat_hi;
          5'd3:    st_word = dat_lo;
          5'd4:    st_word = enc_out[63:32];
          5'd5:    st_word = enc_out[31:0];
          5'd6:    st_word = dec_out[63:32];
          5'd7:    st_word = dec_out[31:0];
          default: st_word = '0;
        endcase
      end
      CP_STCSR: st_word = {exc_q, 25'd0, q_valid, dec_busy, enc_busy, 3'd0};
      CP_STDCQ: st_word = e_info.cnt[0] ? q_inst : q_pc;
      default:  st_word = '0;
    endcase
  end

  // interlocks and stalls
  always_comb begin
    logic e_reads_enc, e_reads_dec;
    e_reads_enc = e_info.valid && (e_info.op inside {CP_STC, CP_STDC}) &&
                  (reg_idx(e_info) inside {5'd4, 5'd5});
    e_reads_dec = e_info.valid && (e_info.op inside {CP_STC, CP_STDC}) &&
                  (reg_idx(e_info) inside {5'd6, 5'd7});
    lock_req = a_info.valid && cp_is_store(a_info.op) &&
               ((e_info.valid && (cp_is_load(e_info.op) || cp_is_cpop(e_info.op))) ||
                (m_info.valid && (cp_is_load(m_info.op) || cp_is_cpop(m_info.op))));
    hold_req = (e_reads_enc && enc_busy) || (e_reads_dec && dec_busy) ||
               (is_cpop_op(x_info, OPC_ENC) && enc_busy) ||
               (is_cpop_op(x_info, OPC_DEC) && dec_busy);
    ccv = !((a_info.valid && cp_is_cpop(a_info.op)) || (e_info.valid && cp_is_cpop(e_info.op)) ||
            (m_info.valid && cp_is_cpop(m_info.op)) || (x_info.valid && cp_is_cpop(x_info.op)));
  end

  assign enc_start = x_fire && is_cpop_op(x_info, OPC_ENC);
  assign dec_start = x_fire && is_cpop_op(x_info, OPC_DEC);

  // commits at the end of the exception stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_hi  <= '0;
      key_lo  <= '0;
      dat_hi  <= '0;
      dat_lo  <= '0;
      exc_q   <= 1'b0;
      q_valid <= 1'b0;
      q_pc    <= '0;
      q_inst  <= '0;
    end else begin
      if (cpi.exack) exc_q <= 1'b0;
      if (x_fire) begin
        unique case (x_info.op)
          CP_LDC, CP_LDDC: begin
            unique case (reg_idx(x_info))
              5'd0:    key_hi <= x_lddata;
              5'd1:    key_lo <= x_lddata;
              5'd2:    dat_hi <= x_lddata;
              5'd3:    dat_lo <= x_lddata;
              default: ;
            endcase
          end
          CP_LDCSR: if (x_lddata[31]) exc_q <= 1'b0;
          CP_STDCQ: if (x_info.cnt[0]) q_valid <= 1'b0;
          CP_CPOP1, CP_CPOP2: begin
            if (!(x_info.op == CP_CPOP1 && x_info.opc inside {OPC_ENC, OPC_DEC})) begin
              exc_q   <= 1'b1;
              q_valid <= 1'b1;
              q_pc    <= x_info.pc;
              q_inst  <= x_info.inst;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // a core is only started when idle: the stall above guarantees it
  assert property (@(posedge clk) disable iff (!rst_n) enc_start |-> !enc_busy);
  assert property (@(posedge clk) disable iff (!rst_n) dec_start |-> !dec_busy);

endmodule
