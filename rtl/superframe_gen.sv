// Superframe symbol generator for one stream of the multi-beam gateway.
//
// On every sym_tick it emits the next symbol of a simplified DVB-S2X-style
// superframe, tagged with its segment:
//   SOSF  SOSF_LEN chips of Walsh-Hadamard row wh_idx (BPSK), optionally
//         scrambled (scr_sosf)
//   SFFI  the 4-bit super-frame format indicator, each bit repeated
//         SFFI_LEN/4 times (BPSK)
//   then FRAMES frames of
//   PLH   the 8-bit MODCOD, each bit repeated PLH_LEN/8 times (BPSK)
//   P2    P2_LEN chips of Walsh-Hadamard row (wh_idx mod P2_LEN)
//   BLOCKS x { PAY_LEN QPSK payload symbols, P_LEN chips of WH row
//              (wh_idx mod P_LEN) as the P pilot field }
// P2 and P pilots are optionally scrambled (scr_pilots) by a sequence that is
// common to all streams, so pilots of different streams stay orthogonal when
// their WH indices differ modulo the pilot length; a terminal separates the
// beams with them.  Payload bits come from a valid/ready pair, two bits per
// QPSK symbol (bit 0 -> sign of I, bit 1 -> sign of Q); when no bits are
// offered, zeros are sent and `underflow` pulses.
// The configuration fields (MODCOD, SFFI, WH index, scramble flags for
// pilots and SOSF) are those of the gateway configuration; the stream index
// of that configuration is the instance's position in the top.  The
// field lengths, the header coding and the spreading are this design's
// simplification, not the DVB-S2X frame format.  Output is registered: one
// cycle after sym_tick.
module superframe_gen
  import pc_pkg::*;
#(
  parameter int unsigned L_SOSF   = SOSF_LEN,
  parameter int unsigned L_SFFI   = SFFI_LEN,
  parameter int unsigned L_PLH    = PLH_LEN,
  parameter int unsigned L_P2     = P2_LEN,
  parameter int unsigned L_P      = P_LEN,
  parameter int unsigned L_PAY    = PAY_LEN,
  parameter int unsigned N_BLOCKS = BLOCKS,
  parameter int unsigned N_FRAMES = FRAMES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sym_tick,
  // configuration
  input  logic [7:0] modcod,
  input  logic [3:0] sffi,
  input  logic [7:0] wh_idx,
  input  logic       scr_pilots,
  input  logic       scr_sosf,
  // payload bits
  input  logic       bits_valid,
  input  logic [1:0] bits,
  output logic       bits_ready,
  // symbol output
  output logic       out_valid,
  output cplx_t      out_sym,
  output seg_t       out_seg,
  output logic       sf_start,
  output logic       underflow
);
  localparam int unsigned CW = 16;
  seg_t          seg;
  logic [CW-1:0] idx;      // symbol index within the segment
  logic          last_in_seg;
  logic [6:0]    scr;
  logic          chip;
  logic          scr_on;
  cplx_t         sym_c;

  sf_position #(
    .L_SOSF(L_SOSF), .L_SFFI(L_SFFI), .L_PLH(L_PLH), .L_P2(L_P2), .L_P(L_P),
    .L_PAY(L_PAY), .N_BLOCKS(N_BLOCKS), .N_FRAMES(N_FRAMES), .CW(CW)
  ) u_pos (
    .clk, .rst_n,
    .advance (sym_tick),
    .load    (1'b0),
    .load_idx('0),
    .seg     (seg),
    .idx     (idx),
    .last    (last_in_seg)
  );

  // Symbol of the current position
  always_comb begin
    chip   = 1'b0;
    scr_on = 1'b0;
    sym_c  = CPLX_ZERO;
    bits_ready = 1'b0;
    unique case (seg)
      SEG_SOSF: begin
        scr_on = scr_sosf;
        chip   = wh_chip(wh_idx, idx[7:0]);
      end
      SEG_SFFI: chip = sffi[3 - (idx / CW'(L_SFFI / 4))];
      SEG_PLH:  chip = modcod[7 - (idx / CW'(L_PLH / 8))];
      SEG_P2: begin
        scr_on = scr_pilots;
        chip   = wh_chip(wh_idx & 8'(L_P2 - 1), idx[7:0]);
      end
      SEG_P: begin
        scr_on = scr_pilots;
        chip   = wh_chip(wh_idx & 8'(L_P - 1), idx[7:0]);
      end
      default: bits_ready = sym_tick;
    endcase
    if (seg == SEG_PAYLOAD) begin
      sym_c.re = (bits_valid && bits[0]) ? -SW'(SYM_A) : SW'(SYM_A);
      sym_c.im = (bits_valid && bits[1]) ? -SW'(SYM_A) : SW'(SYM_A);
    end else begin
      sym_c = bpsk(chip ^ (scr_on & scr[0]));
    end
  end

  // Scrambler, restarted at every field
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     scr <= SCR_SEED;
    else if (sym_tick) scr <= last_in_seg ? SCR_SEED : scr_next(scr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= CPLX_ZERO;
      out_seg   <= SEG_SOSF;
      sf_start  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      out_valid <= sym_tick;
      sf_start  <= sym_tick && seg == SEG_SOSF && idx == '0;
      underflow <= sym_tick && seg == SEG_PAYLOAD && !bits_valid;
      if (sym_tick) begin
        out_sym <= sym_c;
        out_seg <= seg;
      end
    end
  end
endmodule
