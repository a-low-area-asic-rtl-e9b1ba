// aegis_control_unit: host-level state machine and micro-sequencer.
//
// Host level. The host moves the core through its states by writing the
// start bit of CONTROL; the reset bit returns it to IDLE from anywhere.
//   IDLE        key -> DATA, IV -> TAG;          start: BUSY (initialisation)
//   LOAD_LEN    adlen, msglen -> TAG;            start: LOAD_AD, LOAD_DATA or
//                                                BUSY (finalisation)
//   LOAD_AD     one 128-bit AD block -> DATA;    start: BUSY (absorb it)
//   LOAD_DATA   one message block -> DATA;       start: BUSY (en/decrypt it)
//   READ_CIPHER result block in DATA;            start: LOAD_DATA or
//                                                BUSY (finalisation)
//   READ_TAG    tag in TAG;                      start: IDLE
// After a BUSY phase the core moves on by itself: initialisation ends in
// LOAD_LEN, an AD block in LOAD_AD while AD blocks remain (else as from
// LOAD_LEN), a message block in READ_CIPHER, finalisation in READ_TAG. The
// numbers of blocks are ceil(adlen/128) and ceil(msglen/128), lengths in
// bits. The order of the states and the moment the lengths are loaded (before
// the data, so that the last block can be masked) are this design's reading.
//
// Micro level. In BUSY a sequencer issues one micro-instruction per clock:
//   StateUpdate128 = five AES rounds, each LOAD, 17 x SubBytes, ShiftRows,
//   4 x MixColumns, XOR (and XOR m for the first), store: 128 clocks.
//   The first round writes the new S0 into TEMP, the others overwrite S4,
//   S3, S2, S1 in that order, then TEMP is moved into S0.
//   Initialisation: 9 clocks to build S from key, IV and constants, then 10
//   updates with m = key, IV, key, ...             (1289 clocks)
//   AD block: one update with m = DATA             (128 clocks)
//   Encrypt: mask P (3), first round, C -> DATA (6), rounds 2-5 (137 clocks)
//   Decrypt: P = masked C ^ keystream -> DATA (7), one update (135 clocks)
//   Finalisation: tmp -> DATA (3), 7 updates, tag -> TAG (6) (905 clocks)
//
// Interface: ctrl_we/ctrl_wdata is a CONTROL byte written by the bus;
// tag_q supplies the two lengths. Outputs: host state, mode, micro-op and
// the last-block flag for the datapath's mask.
module aegis_control_unit
  import aegis_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctrl_we,
  input  logic [7:0]    ctrl_wdata,
  input  logic [127:0]  tag_q,
  output host_state_e   state,
  output logic          decrypt,
  output logic          busy,
  output logic          last_blk,
  output uop_t          uop
);

  typedef enum logic [1:0] {JOB_INIT, JOB_AD, JOB_MSG, JOB_FINAL} job_e;
  typedef enum logic [2:0] {SQ_INITLD, SQ_PRE, SQ_ROUND, SQ_MID, SQ_MOVE,
                            SQ_FTMP, SQ_TAGX} seq_e;

  job_e        job;
  seq_e        seq;
  logic [4:0]  step;
  logic [2:0]  rnd;
  logic [3:0]  upd;          // index of the running update within the job
  logic [57:0] blk_cnt;      // blocks done in the current AD / message phase
  logic [57:0] ad_blocks, msg_blocks;
  logic        start_req, reset_req;
  logic [4:0]  last_step;
  logic [3:0]  n_upd;
  src_e        m_src;

  assign ad_blocks  = {1'b0, tag_q[63:7]}   + 58'(|tag_q[6:0]);
  assign msg_blocks = {1'b0, tag_q[127:71]} + 58'(|tag_q[70:64]);

  assign start_req = ctrl_we && ctrl_wdata[CTRL_START];
  assign reset_req = ctrl_we && ctrl_wdata[CTRL_RESET];
  assign busy      = (state == ST_BUSY);
  assign last_blk  = (job == JOB_MSG) && (blk_cnt + 58'd1 == msg_blocks);

  always_comb begin
    unique case (job)
      JOB_INIT:  n_upd = 4'd10;
      JOB_FINAL: n_upd = 4'd7;
      default:   n_upd = 4'd1;
    endcase
    m_src = (job == JOB_INIT && upd[0]) ? SRC_TAG : SRC_DATA;
  end

  // Last step of the current sequencer phase.
  always_comb begin
    unique case (seq)
      SQ_INITLD: last_step = 5'd8;
      SQ_PRE:    last_step = decrypt ? 5'd6 : 5'd2;
      SQ_ROUND:  last_step = (rnd == 3'd0) ? 5'd25 : 5'd24;
      SQ_MID:    last_step = 5'd5;
      SQ_MOVE:   last_step = 5'd1;
      SQ_FTMP:   last_step = 5'd2;
      SQ_TAGX:   last_step = 5'd5;
      default:   last_step = 5'd0;
    endcase
  end

  // Micro-instruction of the current step.
  function automatic uop_t mk(alu_op_e op, src_e src, dst_e dst, logic [4:0] idx);
    uop_t u;
    u.op = op; u.src = src; u.dst = dst; u.idx = idx;
    return u;
  endfunction

  function automatic src_e s_word(logic [2:0] j);
    return src_e'({1'b0, j});
  endfunction

  function automatic dst_e d_word(logic [2:0] j);
    return dst_e'({1'b0, j} + 4'd1);
  endfunction

  always_comb begin
    uop = UOP_NOP;
    if (busy) begin
      unique case (seq)
        SQ_INITLD:
          unique case (step)
            5'd0: uop = mk(ALU_LOAD, SRC_DATA, DST_NONE, 5'd0);
            5'd1: uop = mk(ALU_XOR,  SRC_TAG,  DST_NONE, 5'd0);
            5'd2: uop = mk(ALU_LOAD, SRC_C1,   DST_S0,   5'd0);
            5'd3: uop = mk(ALU_LOAD, SRC_C0,   DST_S1,   5'd0);
            5'd4: uop = mk(ALU_LOAD, SRC_DATA, DST_S2,   5'd0);
            5'd5: uop = mk(ALU_XOR,  SRC_C0,   DST_NONE, 5'd0);
            5'd6: uop = mk(ALU_LOAD, SRC_DATA, DST_S3,   5'd0);
            5'd7: uop = mk(ALU_XOR,  SRC_C1,   DST_NONE, 5'd0);
            default: uop = mk(ALU_NOP, SRC_S0, DST_S4,   5'd0);
          endcase
        SQ_PRE:
          if (!decrypt) begin
            // keep only the valid bits of the plaintext block
            unique case (step)
              5'd0: uop = mk(ALU_LOAD, SRC_DATA, DST_NONE, 5'd0);
              5'd1: uop = mk(ALU_AND,  SRC_MASK, DST_NONE, 5'd0);
              default: uop = mk(ALU_NOP, SRC_S0, DST_DATA, 5'd0);
            endcase
          end else begin
            // P = (C ^ S1 ^ S4 ^ (S2 & S3)) & mask
            unique case (step)
              5'd0: uop = mk(ALU_LOAD, SRC_S2,   DST_NONE, 5'd0);
              5'd1: uop = mk(ALU_AND,  SRC_S3,   DST_NONE, 5'd0);
              5'd2: uop = mk(ALU_XOR,  SRC_S1,   DST_NONE, 5'd0);
              5'd3: uop = mk(ALU_XOR,  SRC_S4,   DST_NONE, 5'd0);
              5'd4: uop = mk(ALU_XOR,  SRC_DATA, DST_NONE, 5'd0);
              5'd5: uop = mk(ALU_AND,  SRC_MASK, DST_NONE, 5'd0);
              default: uop = mk(ALU_NOP, SRC_S0, DST_DATA, 5'd0);
            endcase
          end
        SQ_MID:
          // C = P ^ S1 ^ S4 ^ (S2 & S3), S1..S4 still hold the old state
          unique case (step)
            5'd0: uop = mk(ALU_LOAD, SRC_S2,   DST_NONE, 5'd0);
            5'd1: uop = mk(ALU_AND,  SRC_S3,   DST_NONE, 5'd0);
            5'd2: uop = mk(ALU_XOR,  SRC_S1,   DST_NONE, 5'd0);
            5'd3: uop = mk(ALU_XOR,  SRC_S4,   DST_NONE, 5'd0);
            5'd4: uop = mk(ALU_XOR,  SRC_DATA, DST_NONE, 5'd0);
            default: uop = mk(ALU_NOP, SRC_S0, DST_DATA, 5'd0);
          endcase
        SQ_ROUND: begin
          // round rnd: new S[(5-rnd)%5] = AESRound(S[4-rnd], S[(5-rnd)%5] (^ m))
          if (step == 5'd0)
            uop = mk(ALU_LOAD, s_word(3'd4 - rnd), DST_NONE, 5'd0);
          else if (step <= 5'd17)
            uop = mk(ALU_SB, SRC_S0, DST_NONE, step - 5'd1);
          else if (step == 5'd18)
            uop = mk(ALU_SR, SRC_S0, DST_NONE, 5'd0);
          else if (step <= 5'd22)
            uop = mk(ALU_MC, SRC_S0, DST_NONE, step - 5'd19);
          else if (step == 5'd23)
            uop = mk(ALU_XOR, (rnd == 3'd0) ? SRC_S0 : s_word(3'd5 - rnd), DST_NONE, 5'd0);
          else if (step == 5'd24 && rnd == 3'd0)
            uop = mk(ALU_XOR, m_src, DST_NONE, 5'd0);
          else
            uop = mk(ALU_NOP, SRC_S0, (rnd == 3'd0) ? DST_TEMP : d_word(3'd5 - rnd), 5'd0);
        end
        SQ_MOVE:
          if (step == 5'd0) uop = mk(ALU_LOAD, SRC_TEMP, DST_NONE, 5'd0);
          else              uop = mk(ALU_NOP,  SRC_S0,   DST_S0,   5'd0);
        SQ_FTMP:
          // tmp = S3 ^ (adlen || msglen)
          unique case (step)
            5'd0: uop = mk(ALU_LOAD, SRC_S3,  DST_NONE, 5'd0);
            5'd1: uop = mk(ALU_XOR,  SRC_TAG, DST_NONE, 5'd0);
            default: uop = mk(ALU_NOP, SRC_S0, DST_DATA, 5'd0);
          endcase
        SQ_TAGX:
          // T = S0 ^ S1 ^ S2 ^ S3 ^ S4
          if (step == 5'd0)      uop = mk(ALU_LOAD, SRC_S0, DST_NONE, 5'd0);
          else if (step <= 5'd4) uop = mk(ALU_XOR, s_word(3'(step)), DST_NONE, 5'd0);
          else                   uop = mk(ALU_NOP, SRC_S0, DST_TAG, 5'd0);
        default: uop = UOP_NOP;
      endcase
    end
  end

  // Sequencer and host state machine: next state in always_comb, registers
  // below. go/go_job request the start of a BUSY job; ad_over takes the
  // flow past the (possibly empty) AD phase.
  host_state_e state_d;
  job_e        job_d;
  seq_e        seq_d;
  logic [4:0]  step_d;
  logic [2:0]  rnd_d;
  logic [3:0]  upd_d;
  logic [57:0] blk_cnt_d;
  logic        decrypt_d;

  always_comb begin
    logic go;
    job_e go_job;
    logic ad_over;
    go        = 1'b0;
    go_job    = JOB_INIT;
    ad_over   = 1'b0;
    state_d   = state;
    job_d     = job;
    seq_d     = seq;
    step_d    = step;
    rnd_d     = rnd;
    upd_d     = upd;
    blk_cnt_d = blk_cnt;
    decrypt_d = decrypt;
    if (reset_req) begin
      state_d   = ST_IDLE;
      blk_cnt_d = '0;
    end else if (state == ST_BUSY) begin
      if (step != last_step) begin
        step_d = step + 5'd1;
      end else begin
        step_d = '0;
        unique case (seq)
          SQ_INITLD, SQ_PRE, SQ_FTMP: seq_d = SQ_ROUND;
          SQ_MID: begin seq_d = SQ_ROUND; rnd_d = 3'd1; end
          SQ_ROUND:
            if (rnd == 3'd4) seq_d = SQ_MOVE;
            else if (rnd == 3'd0 && job == JOB_MSG && !decrypt) seq_d = SQ_MID;
            else rnd_d = rnd + 3'd1;
          SQ_MOVE: begin
            rnd_d = '0;
            if (upd + 4'd1 != n_upd) begin
              upd_d = upd + 4'd1;
              seq_d = SQ_ROUND;
            end else if (job == JOB_FINAL) begin
              seq_d = SQ_TAGX;
            end else begin
              unique case (job)
                JOB_INIT: state_d = ST_LOAD_LEN;
                JOB_AD:
                  if (blk_cnt + 58'd1 != ad_blocks) begin
                    blk_cnt_d = blk_cnt + 58'd1;
                    state_d   = ST_LOAD_AD;
                  end else begin
                    ad_over = 1'b1;
                  end
                default: begin  // JOB_MSG
                  blk_cnt_d = blk_cnt + 58'd1;
                  state_d   = ST_READ_CIPHER;
                end
              endcase
            end
          end
          default: state_d = ST_READ_TAG;  // SQ_TAGX
        endcase
      end
    end else begin
      if (ctrl_we && state == ST_IDLE) decrypt_d = ctrl_wdata[CTRL_DECRYPT];
      if (start_req) begin
        unique case (state)
          ST_IDLE:      begin go = 1'b1; go_job = JOB_INIT; end
          ST_LOAD_LEN: begin
            blk_cnt_d = '0;
            if (ad_blocks != '0) state_d = ST_LOAD_AD;
            else                 ad_over = 1'b1;
          end
          ST_LOAD_AD:   begin go = 1'b1; go_job = JOB_AD; end
          ST_LOAD_DATA: begin go = 1'b1; go_job = JOB_MSG; end
          ST_READ_CIPHER:
            if (blk_cnt != msg_blocks) state_d = ST_LOAD_DATA;
            else begin go = 1'b1; go_job = JOB_FINAL; end
          default:      state_d = ST_IDLE;  // READ_TAG
        endcase
      end
    end
    if (ad_over) begin
      blk_cnt_d = '0;
      if (msg_blocks != '0) state_d = ST_LOAD_DATA;
      else begin go = 1'b1; go_job = JOB_FINAL; end
    end
    if (go) begin
      job_d   = go_job;
      state_d = ST_BUSY;
      step_d  = '0;
      rnd_d   = '0;
      upd_d   = '0;
      unique case (go_job)
        JOB_INIT:  seq_d = SQ_INITLD;
        JOB_MSG:   seq_d = SQ_PRE;
        JOB_FINAL: seq_d = SQ_FTMP;
        default:   seq_d = SQ_ROUND;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      job     <= JOB_INIT;
      seq     <= SQ_INITLD;
      step    <= '0;
      rnd     <= '0;
      upd     <= '0;
      blk_cnt <= '0;
      decrypt <= 1'b0;
    end else begin
      state   <= state_d;
      job     <= job_d;
      seq     <= seq_d;
      step    <= step_d;
      rnd     <= rnd_d;
      upd     <= upd_d;
      blk_cnt <= blk_cnt_d;
      decrypt <= decrypt_d;
    end
  end

endmodule
