// Warp Engine: a runtime-configured parse-and-match pipeline that runs the
// packet-parsing and classification part of an eBPF/XDP program in hardware,
// in front of an eBPF executor (hXDP).
//
// Every packet goes through one pipeline that never stalls on its own:
//   splitter      copies the first 128B of the packet (the chunk);
//   key extractor 12 stages, each reading up to 2B of the chunk and
//                 combining them with a 2B constant into a 16B lookup key;
//   match-action  64-entry TCAM, then the Action, Registers Configuration
//                 and Stack Configuration Memories at the matched line;
//   context restoration  two 10-stage pipelines that rebuild R1-R9 and up
//                 to 136B of stack from chunk bytes and constants;
//   output        one register holding the per-packet context for hXDP.
// The result (ctx) is either a forwarding decision (action.restore = 0,
// action.r0 = XDP action code) or a context restore (program counter,
// restored registers and stack bytes with their write enables). On a TCAM
// miss the packet is passed with hit = 0 and PC 0, i.e. not warped.
// The whole packet is carried, beat by beat and in order, through the
// packet data path (pkt_* outputs) to the executor's packet buffer.
//
// Timing: ctx_valid rises 28 cycles after the cycle in which the beat that
// completes a packet's chunk (its second beat, or its only beat) is
// accepted, when nothing stalls. One packet can enter per cycle. The only
// stall is the executor: while ctx_valid is high and ctx_ready low, every
// stage holds (a single enable, en) and in_ready is low.
//
// Configuration (written at run time, from the rule compiler's output):
// ke_cfg_* sets one key extractor stage; tcam_* one TCAM entry (entry
// index = rule priority, lower wins); act_we / regcfg_we / stkcfg_we write
// line line_idx of the three memories.
//
// The block structure, stage counts and sizes follow the design; the stall
// mechanism realised as one global enable, the miss behaviour, encodings
// and the packet FIFO are this implementation's own.
module warp_engine
  import warp_pkg::*;
#(
  parameter int unsigned PKT_FIFO_DEPTH = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // packet input (receive queue)
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [BEAT_W-1:0]               in_data,
  input  logic [BEAT_BYTES-1:0]           in_keep,
  input  logic                            in_last,
  // runtime configuration
  input  logic                            ke_cfg_we,
  input  logic [$clog2(KE_STAGES)-1:0]    ke_cfg_idx,
  input  ke_cfg_t                         ke_cfg_data,
  input  logic                            tcam_we,
  input  logic [LINE_W-1:0]               tcam_idx,
  input  logic                            tcam_valid,
  input  logic [KEY_W-1:0]                tcam_value,
  input  logic [KEY_W-1:0]                tcam_mask,
  input  logic                            act_we,
  input  logic                            regcfg_we,
  input  logic                            stkcfg_we,
  input  logic [LINE_W-1:0]               line_idx,
  input  action_t                         act_data,
  input  reg_line_t                       regcfg_data,
  input  stack_line_t                     stkcfg_data,
  // per-packet context to the executor
  output logic                            ctx_valid,
  input  logic                            ctx_ready,
  output ctx_t                            ctx,
  // packet data to the executor's packet buffer
  output logic                            pkt_valid,
  input  logic                            pkt_ready,
  output logic [BEAT_W-1:0]               pkt_data,
  output logic [BEAT_BYTES-1:0]           pkt_keep,
  output logic                            pkt_last
);

  // single pipeline enable: hold everything while the executor is busy
  logic en;
  assign en = !ctx_valid || ctx_ready;

  // ---------------- splitter + packet data path ----------------
  logic                  pd_valid, pd_ready, pd_last;
  logic [BEAT_W-1:0]     pd_data;
  logic [BEAT_BYTES-1:0] pd_keep;
  logic                  ch_valid;
  logic [CHUNK_W-1:0]    ch_data;

  pkt_splitter u_splitter (
    .clk, .rst_n, .en,
    .in_valid, .in_ready, .in_data, .in_keep, .in_last,
    .pd_valid, .pd_ready, .pd_data, .pd_keep, .pd_last,
    .chunk_valid(ch_valid), .chunk(ch_data)
  );

  pkt_fifo #(.DEPTH(PKT_FIFO_DEPTH)) u_pkt_path (
    .clk, .rst_n,
    .in_valid (pd_valid), .in_ready(pd_ready),
    .in_data  (pd_data),  .in_keep (pd_keep), .in_last(pd_last),
    .out_valid(pkt_valid), .out_ready(pkt_ready),
    .out_data (pkt_data),  .out_keep (pkt_keep), .out_last(pkt_last)
  );

  // ---------------- key extractor ----------------
  logic               k_valid;
  logic [CHUNK_W-1:0] k_chunk;
  logic [KEY_W-1:0]   k_key;

  key_extractor #(.N_STAGES(KE_STAGES)) u_key_extractor (
    .clk, .rst_n, .en,
    .cfg_we(ke_cfg_we), .cfg_idx(ke_cfg_idx), .cfg_data(ke_cfg_data),
    .in_valid(ch_valid), .in_chunk(ch_data),
    .out_valid(k_valid), .out_chunk(k_chunk), .out_key(k_key)
  );

  // ---------------- match-action unit ----------------
  logic               m_valid, m_hit;
  action_t            m_action;
  reg_line_t          m_regcfg;
  stack_line_t        m_stkcfg;
  logic [CHUNK_W-1:0] m_chunk;

  match_action_unit #(.ENTRIES(TCAM_ENTRIES)) u_mau (
    .clk, .rst_n, .en,
    .tcam_we, .tcam_idx, .tcam_valid, .tcam_value, .tcam_mask,
    .act_we, .regcfg_we, .stkcfg_we, .line_idx, .act_data, .regcfg_data, .stkcfg_data,
    .in_valid(k_valid), .in_key(k_key), .in_chunk(k_chunk),
    .out_valid(m_valid), .out_hit(m_hit), .out_action(m_action),
    .out_regcfg(m_regcfg), .out_stkcfg(m_stkcfg), .out_chunk(m_chunk)
  );

  // ---------------- context restoration unit ----------------
  logic c_valid;
  ctx_t c_ctx;

  context_restoration_unit u_cru (
    .clk, .rst_n, .en,
    .in_valid(m_valid), .in_hit(m_hit), .in_action(m_action),
    .in_regcfg(m_regcfg), .in_stkcfg(m_stkcfg), .in_chunk(m_chunk),
    .out_valid(c_valid), .out_ctx(c_ctx)
  );

  // ---------------- hand-off register to the executor ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_valid <= 1'b0;
      ctx       <= '0;
    end else if (en) begin
      ctx_valid <= c_valid;
      ctx       <= c_ctx;
    end
  end

  // the context offered to the executor does not change until it is taken
  a_ctx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               ctx_valid && !ctx_ready |=> ctx_valid && $stable(ctx));

endmodule
