// Match-action unit: TCAM lookup of the lookup key, then a parallel read of
// the Action Memory, the Registers Configuration Memory and the Stack
// Configuration Memory at the matched line number.
//
// If the action line is a forwarding decision, only that line goes on: the
// register and stack configuration lines are replaced by all-idle lines, so
// the Context Restoration Unit writes nothing for the packet. If no entry
// matches, the packet is handed to the executor as not warped: hit = 0,
// a context-restore action with PC 0 and idle configuration lines, so the
// program runs from its first instruction.
//
// Latency: three enabled cycles (TCAM compare, priority encode, memory
// read); one key per cycle. The packet chunk travels with the key. The
// TCAM and the three memories are written at run time through their own
// write ports.
//
// The TCAM plus three memories and the forward-only propagation follow the
// design; the miss behaviour and the three-cycle split are this
// implementation's own.
module match_action_unit
  import warp_pkg::*;
#(
  parameter int unsigned ENTRIES = TCAM_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  // runtime configuration
  input  logic                       tcam_we,
  input  logic [$clog2(ENTRIES)-1:0] tcam_idx,
  input  logic                       tcam_valid,
  input  logic [KEY_W-1:0]           tcam_value,
  input  logic [KEY_W-1:0]           tcam_mask,
  input  logic                       act_we,
  input  logic                       regcfg_we,
  input  logic                       stkcfg_we,
  input  logic [$clog2(ENTRIES)-1:0] line_idx,
  input  action_t                    act_data,
  input  reg_line_t                  regcfg_data,
  input  stack_line_t                stkcfg_data,
  // key in
  input  logic                       in_valid,
  input  logic [KEY_W-1:0]           in_key,
  input  logic [CHUNK_W-1:0]         in_chunk,
  // action and context configuration out
  output logic                       out_valid,
  output logic                       out_hit,
  output action_t                    out_action,
  output reg_line_t                  out_regcfg,
  output stack_line_t                out_stkcfg,
  output logic [CHUNK_W-1:0]         out_chunk
);

  logic                       t_valid, t_hit;
  logic [$clog2(ENTRIES)-1:0] t_line;
  logic [CHUNK_W-1:0]         t_chunk;

  tcam #(.ENTRIES(ENTRIES), .SB_W(CHUNK_W)) u_tcam (
    .clk, .rst_n, .en,
    .wr_en    (tcam_we),
    .wr_idx   (tcam_idx),
    .wr_valid (tcam_valid),
    .wr_value (tcam_value),
    .wr_mask  (tcam_mask),
    .in_valid,
    .in_key,
    .in_sb    (in_chunk),
    .out_valid(t_valid),
    .out_hit  (t_hit),
    .out_line (t_line),
    .out_sb   (t_chunk)
  );

  action_t     m_act;
  reg_line_t   m_reg;
  stack_line_t m_stk;

  line_memory #(.WIDTH($bits(action_t)), .LINES(ENTRIES)) u_action_mem (
    .clk, .rst_n, .en,
    .wr_en(act_we), .wr_addr(line_idx), .wr_data(act_data),
    .rd_addr(t_line), .rd_data(m_act)
  );

  line_memory #(.WIDTH($bits(reg_line_t)), .LINES(ENTRIES)) u_regcfg_mem (
    .clk, .rst_n, .en,
    .wr_en(regcfg_we), .wr_addr(line_idx), .wr_data(regcfg_data),
    .rd_addr(t_line), .rd_data(m_reg)
  );

  line_memory #(.WIDTH($bits(stack_line_t)), .LINES(ENTRIES)) u_stkcfg_mem (
    .clk, .rst_n, .en,
    .wr_en(stkcfg_we), .wr_addr(line_idx), .wr_data(stkcfg_data),
    .rd_addr(t_line), .rd_data(m_stk)
  );

  // valid, hit and chunk follow the memory read
  logic               r_valid, r_hit;
  logic [CHUNK_W-1:0] r_chunk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_hit   <= 1'b0;
      r_chunk <= '0;
    end else if (en) begin
      r_valid <= t_valid;
      r_hit   <= t_hit;
      r_chunk <= t_chunk;
    end
  end

  always_comb begin
    out_valid = r_valid;
    out_hit   = r_hit;
    out_chunk = r_chunk;
    if (!r_hit) begin
      out_action         = '0;
      out_action.restore = 1'b1;
      out_regcfg         = '0;
      out_stkcfg         = '0;
    end else begin
      out_action = m_act;
      out_regcfg = m_act.restore ? m_reg : '0;
      out_stkcfg = m_act.restore ? m_stk : '0;
    end
  end

endmodule
