// Ternary CAM: ENTRIES (64) entries of KEY_W (16B) value/mask pairs.
//
// An entry matches when it is valid and (key & mask) == (value & mask);
// a mask bit of 0 is "don't care". Entries are kept in priority order: the
// lowest-numbered matching entry wins, so the rule compiler writes rule
// priority p at entry p. The lookup is two enabled cycles: the first
// registers the per-entry match vector, the second the priority-encoded
// line number and the hit flag. A side-band word (sb, the packet chunk in
// the engine) travels along with the same latency. Entries are written at
// run time through the wr_* port.
//
// The entry count and width follow the design; the two-stage split, the
// priority rule tied to the entry number and the write port are this
// implementation's own.
module tcam
  import warp_pkg::*;
#(
  parameter int unsigned ENTRIES = TCAM_ENTRIES,
  parameter int unsigned SB_W    = CHUNK_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  // entry write
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       wr_valid,
  input  logic [KEY_W-1:0]           wr_value,
  input  logic [KEY_W-1:0]           wr_mask,
  // lookup
  input  logic                       in_valid,
  input  logic [KEY_W-1:0]           in_key,
  input  logic [SB_W-1:0]            in_sb,
  output logic                       out_valid,
  output logic                       out_hit,
  output logic [$clog2(ENTRIES)-1:0] out_line,
  output logic [SB_W-1:0]            out_sb
);

  logic [KEY_W-1:0] value [ENTRIES];
  logic [KEY_W-1:0] mask  [ENTRIES];
  logic [ENTRIES-1:0] ent_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ent_valid         <= '0;
    else if (wr_en)  ent_valid[wr_idx] <= wr_valid;
  end

  // value/mask need no reset: an entry is only compared once it is valid
  always_ff @(posedge clk) begin
    if (wr_en) begin
      value[wr_idx] <= wr_value & wr_mask;
      mask[wr_idx]  <= wr_mask;
    end
  end

  // stage 1: compare
  logic [ENTRIES-1:0] match_c, match_q;
  always_comb begin
    for (int e = 0; e < ENTRIES; e++)
      match_c[e] = ent_valid[e] && ((in_key & mask[e]) == value[e]);
  end

  logic            s1_valid;
  logic [SB_W-1:0] s1_sb;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      match_q  <= '0;
      s1_sb    <= '0;
    end else if (en) begin
      s1_valid <= in_valid;
      match_q  <= match_c;
      s1_sb    <= in_sb;
    end
  end

  // stage 2: priority encode (lowest index wins)
  logic [$clog2(ENTRIES)-1:0] line_c;
  always_comb begin
    line_c = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (match_q[e]) line_c = e[$clog2(ENTRIES)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_line  <= '0;
      out_sb    <= '0;
    end else if (en) begin
      out_valid <= s1_valid;
      out_hit   <= |match_q;
      out_line  <= line_c;
      out_sb    <= s1_sb;
    end
  end

endmodule
