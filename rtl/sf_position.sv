// Position within the superframe: segment, index in the segment, block and
// frame counters.  `advance` steps to the next symbol position following the
// layout  SOSF, SFFI, FRAMES x { PLH, P2, BLOCKS x { payload, P } }.
// `load` sets the position to (SEG_SFFI, load_idx) with block and frame 0,
// which is where the terminal knows it stands once the SOSF has been found.
// `last` is high on the last symbol of the current segment.  Used by the
// gateway's superframe generator and by the terminal's symbol timing, so both
// ends follow the same layout.
module sf_position
  import pc_pkg::*;
#(
  parameter int unsigned L_SOSF   = SOSF_LEN,
  parameter int unsigned L_SFFI   = SFFI_LEN,
  parameter int unsigned L_PLH    = PLH_LEN,
  parameter int unsigned L_P2     = P2_LEN,
  parameter int unsigned L_P      = P_LEN,
  parameter int unsigned L_PAY    = PAY_LEN,
  parameter int unsigned N_BLOCKS = BLOCKS,
  parameter int unsigned N_FRAMES = FRAMES,
  parameter int unsigned CW       = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  input  logic          load,
  input  logic [CW-1:0] load_idx,
  output seg_t          seg,
  output logic [CW-1:0] idx,
  output logic          last
);
  logic [CW-1:0] blk;
  logic [CW-1:0] frm;
  logic [CW-1:0] seg_len;

  always_comb begin
    unique case (seg)
      SEG_SOSF: seg_len = CW'(L_SOSF);
      SEG_SFFI: seg_len = CW'(L_SFFI);
      SEG_PLH:  seg_len = CW'(L_PLH);
      SEG_P2:   seg_len = CW'(L_P2);
      SEG_P:    seg_len = CW'(L_P);
      default:  seg_len = CW'(L_PAY);
    endcase
    last = (idx == seg_len - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg <= SEG_SOSF;
      idx <= '0;
      blk <= '0;
      frm <= '0;
    end else if (load) begin
      seg <= SEG_SFFI;
      idx <= load_idx;
      blk <= '0;
      frm <= '0;
    end else if (advance) begin
      if (!last) begin
        idx <= idx + 1'b1;
      end else begin
        idx <= '0;
        unique case (seg)
          SEG_SOSF:    seg <= SEG_SFFI;
          SEG_SFFI:    seg <= SEG_PLH;
          SEG_PLH:     seg <= SEG_P2;
          SEG_P2:      seg <= SEG_PAYLOAD;
          SEG_PAYLOAD: seg <= SEG_P;
          default: begin
            if (blk != CW'(N_BLOCKS - 1)) begin
              blk <= blk + 1'b1;
              seg <= SEG_PAYLOAD;
            end else begin
              blk <= '0;
              if (frm != CW'(N_FRAMES - 1)) begin
                frm <= frm + 1'b1;
                seg <= SEG_PLH;
              end else begin
                frm <= '0;
                seg <= SEG_SOSF;
              end
            end
          end
        endcase
      end
    end
  end
endmodule
