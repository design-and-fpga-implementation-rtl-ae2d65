// Keccak-f[1600] permutation module with RERO (recomputing with rotated
// operands) concurrent error detection.
//
// A 576-bit block is XORed into the rate part of the state register (or into
// a zero state for the first block of a message), then the 24 rounds run on a
// round datapath that is cut by a pipeline register after pi: H1 (theta, rho,
// pi) before it, H2 (chi, iota) after it. A single state would leave one half
// idle every other cycle; RERO fills it with a second copy of the state whose
// lanes are all rotated left by ROT_AMT. The two copies alternate through H1
// and H2, so the 24 rounds of both take the same 48 cycles as the 24 rounds of
// one copy on the plain sub-pipelined datapath. iota of the rotated copy uses
// the round constant rotated by ROT_AMT, which keeps every step commuting with
// the rotation. At the end the rotated result is rotated back and compared
// with the original one; a difference sets the error flag of the message.
//
// Cycle plan after the block is accepted (cycle 0):
//   1       H1(original, round 0) -> P; the state register takes the rotated copy
//   2..49   H2 finishes one copy's round (original on even cycles, rotated on
//           odd ones) while H1 starts the other copy's next round
//   49      P takes the original result instead of H1's output
//   50      compare, restore the original result into the state register
// so one block takes 51 cycles from acceptance until blk_ready_o returns.
//
// Interface: blk_* is a valid/ready input of one rate block with first/last
// flags. dig_* is a valid/ready output of the 512-bit digest (lanes 0..7) and
// the error flag, raised after the last block of a message; no block is
// accepted until the digest is taken. fi_mode_i/fi_bit_i inject a fault into
// one bit of the pipeline register while the rounds run (flip, stuck-at-0,
// stuck-at-1); tie fi_mode_i to FI_NONE in normal use. The round split, the
// register after pi, the rotated-operand recomputation and the 48 cycles follow
// the document; the rotation amount, the full-state comparison, the handshakes
// and the fault-injection hook are this design's choices.
module keccak_rero_perm
  import keccak_pkg::*;
#(
  parameter int unsigned ROT_AMT = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // block input
  input  block_t               blk_i,
  input  logic                 blk_first_i,
  input  logic                 blk_last_i,
  input  logic                 blk_valid_i,
  output logic                 blk_ready_o,
  // digest output
  output logic [DIGEST_W-1:0]  dig_o,
  output logic                 dig_error_o,
  output logic                 dig_valid_o,
  input  logic                 dig_ready_i,
  // fault injection hook
  input  fi_mode_e             fi_mode_i,
  input  logic [10:0]          fi_bit_i,
  // status
  output logic                 busy_o,
  output logic                 check_o,       // pulse: a block's comparison happened
  output logic                 check_error_o  // with check_o: that comparison failed
);

  localparam int unsigned LAST_CYC = 2 * ROUNDS + 2;   // 50

  state_t      s_q, p_q;
  state_t      h1_out, h1_faulty, h2_out, absorbed, s_rot;
  logic [5:0]  cyc_q;
  logic        busy_q, last_q, err_q, dig_valid_q;
  logic [4:0]  round;
  logic        rot_thread;
  lane_t       rc_plain, rc_used;
  logic        mismatch;
  logic        accept;

  keccak_h1 u_h1 (.state_i(s_q), .state_o(h1_out));
  keccak_h2 u_h2 (.state_i(p_q), .rc_i(rc_used), .state_o(h2_out));
  keccak_rc u_rc (.round_i(round), .rc_o(rc_plain));
  keccak_rero_check #(.ROT_AMT(ROT_AMT)) u_chk (
    .orig_i (p_q),
    .rot_i  (s_q),
    .error_o(mismatch)
  );

  // Which copy is in H2 this cycle, and which round it finishes.
  always_comb begin
    rot_thread = cyc_q[0];
    round      = 5'((cyc_q - 6'd2) >> 1);
    rc_used    = rot_thread ? rotl(rc_plain, ROT_AMT) : rc_plain;
  end

  // Absorb, rotated copy and fault injection.
  always_comb begin
    absorbed = blk_first_i ? '0 : s_q;
    for (int i = 0; i < RATE_WORDS; i++) absorbed[i] = absorbed[i] ^ blk_i[i];
    for (int i = 0; i < NUM_LANES; i++)  s_rot[i] = rotl(s_q[i], ROT_AMT);
    h1_faulty = h1_out;
    if (fi_bit_i < 11'(STATE_W)) begin
      unique case (fi_mode_i)
        FI_FLIP:   h1_faulty[fi_bit_i / 64][fi_bit_i % 64] = ~h1_out[fi_bit_i / 64][fi_bit_i % 64];
        FI_STUCK0: h1_faulty[fi_bit_i / 64][fi_bit_i % 64] = 1'b0;
        FI_STUCK1: h1_faulty[fi_bit_i / 64][fi_bit_i % 64] = 1'b1;
        default:   ;
      endcase
    end
  end

  assign accept = blk_valid_i && blk_ready_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q         <= '0;
      p_q         <= '0;
      cyc_q       <= '0;
      busy_q      <= 1'b0;
      last_q      <= 1'b0;
      err_q       <= 1'b0;
      dig_valid_q <= 1'b0;
    end else begin
      if (dig_valid_q && dig_ready_i) dig_valid_q <= 1'b0;
      if (accept) begin
        s_q    <= absorbed;
        cyc_q  <= 6'd1;
        busy_q <= 1'b1;
        last_q <= blk_last_i;
        if (blk_first_i) err_q <= 1'b0;
      end else if (busy_q) begin
        cyc_q <= cyc_q + 6'd1;
        if (cyc_q == 6'd1) begin
          p_q <= h1_faulty;
          s_q <= s_rot;
        end else if (cyc_q < 6'(LAST_CYC)) begin
          s_q <= h2_out;
          p_q <= (cyc_q == 6'(LAST_CYC - 1)) ? s_q : h1_faulty;
        end else begin
          s_q    <= p_q;
          busy_q <= 1'b0;
          err_q  <= err_q | mismatch;
          if (last_q) dig_valid_q <= 1'b1;
        end
      end
    end
  end

  assign blk_ready_o   = !busy_q && !dig_valid_q;
  assign busy_o        = busy_q;
  assign check_o       = busy_q && (cyc_q == 6'(LAST_CYC));
  assign check_error_o = check_o && mismatch;
  assign dig_valid_o   = dig_valid_q;
  assign dig_error_o   = err_q;
  always_comb begin
    for (int i = 0; i < DIGEST_W / LANE_W; i++) dig_o[i*LANE_W +: LANE_W] = s_q[i];
  end

  initial assert (ROT_AMT > 0 && ROT_AMT < LANE_W)
    else $error("ROT_AMT must be between 1 and 63");

  a_dig_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dig_valid_o && !dig_ready_i |=> dig_valid_o && $stable(dig_o));

endmodule
