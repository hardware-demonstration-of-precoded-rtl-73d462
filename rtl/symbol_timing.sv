// Symbol timing and deframing of the user terminal.
//
// Takes the oversampled stream together with the sync pulse of frame_sync.
// The sample that arrives with sync is, by construction of frame_sync, at the
// best sampling phase of symbol WIN_SYM-1 of the SFFI field; from it on every
// OSF-th sample is a symbol.  The block emits those samples as symbols
// (sym_valid, sym) with their segment and index, tracked by the same layout
// counters as the gateway's generator.  Every sync re-aligns phase and
// position, so timing is re-acquired once per superframe.  Before the first
// sync nothing is emitted; `locked` reports that a sync has been seen.
// This data-aided, once-per-superframe timing is this design's choice.
// Latency: one clock.
module symbol_timing
  import pc_pkg::*;
#(
  parameter int unsigned OSF_P    = OSF,
  parameter int unsigned WIN_SYM  = 24,
  parameter int unsigned L_SOSF   = SOSF_LEN,
  parameter int unsigned L_SFFI   = SFFI_LEN,
  parameter int unsigned L_PLH    = PLH_LEN,
  parameter int unsigned L_P2     = P2_LEN,
  parameter int unsigned L_P      = P_LEN,
  parameter int unsigned L_PAY    = PAY_LEN,
  parameter int unsigned N_BLOCKS = BLOCKS,
  parameter int unsigned N_FRAMES = FRAMES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  input  logic        sync,
  output logic        locked,
  output logic        sym_valid,
  output cplx_t       sym,
  output seg_t        sym_seg,
  output logic [15:0] sym_idx
);
  logic [$clog2(OSF_P)-1:0] ph;
  logic                     take;
  logic                     adv;

  // A symbol instant: the sync sample, or phase counter about to wrap
  assign take = in_valid && (sync || (locked && ph == ($clog2(OSF_P))'(OSF_P - 1)));
  // Position moves on after each emitted symbol, except that sync loads it
  assign adv  = take && !sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph     <= '0;
      locked <= 1'b0;
    end else if (in_valid) begin
      if (sync) begin
        ph     <= '0;
        locked <= 1'b1;
      end else if (locked) begin
        ph <= (ph == ($clog2(OSF_P))'(OSF_P - 1)) ? '0 : ph + 1'b1;
      end
    end
  end

  // The position counter is updated on the same edge that registers the
  // symbol, so after that edge it holds the position of the symbol on `sym`.
  sf_position #(
    .L_SOSF(L_SOSF), .L_SFFI(L_SFFI), .L_PLH(L_PLH), .L_P2(L_P2), .L_P(L_P),
    .L_PAY(L_PAY), .N_BLOCKS(N_BLOCKS), .N_FRAMES(N_FRAMES), .CW(16)
  ) u_pos (
    .clk, .rst_n,
    .advance (adv),
    .load    (in_valid && sync),
    .load_idx(16'(WIN_SYM - 1)),
    .seg     (sym_seg),
    .idx     (sym_idx),
    .last    ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      sym       <= CPLX_ZERO;
    end else begin
      sym_valid <= take;
      if (take) sym <= in_smp;
    end
  end
endmodule
