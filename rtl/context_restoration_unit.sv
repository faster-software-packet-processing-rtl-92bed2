// Context Restoration Unit: rebuilds the eBPF registers R1-R9 and the stack
// image for a packet that continues in the executor.
//
// The packet chunk is duplicated (second splitter) into two parallel
// pipelines of ten stages each:
//   * registers: REG_STAGES (9) cr_stage extractors, stage i restoring
//     R(i+1), followed by one delay register so that both pipelines have
//     the same length;
//   * stack: STACK_STAGES (10) cr_stage extractors writing into a
//     STACK_BYTES (136B) stack image.
// Each pipeline carries its packet's configuration line (from the Registers
// or Stack Configuration Memory) from stage to stage, because that line
// depends on the TCAM entry the packet matched. The action line and the
// hit flag travel alongside in a ten-deep delay line.
//
// Latency: ten enabled cycles; one packet per cycle. out_ctx is valid with
// out_valid.
//
// Two pipelines of ten stages, nine register extractors plus a delay
// element and the 8B reads follow the design; the buffer formats are this
// implementation's own.
module context_restoration_unit
  import warp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  logic               in_hit,
  input  action_t            in_action,
  input  reg_line_t          in_regcfg,
  input  stack_line_t        in_stkcfg,
  input  logic [CHUNK_W-1:0] in_chunk,
  output logic               out_valid,
  output ctx_t               out_ctx
);

  localparam int unsigned DEPTH   = STACK_STAGES;
  localparam int unsigned RBYTES  = REG_STAGES * 8;

  // ---------------- registers pipeline ----------------
  logic               rv [REG_STAGES+1];
  logic [CHUNK_W-1:0] rc [REG_STAGES+1];
  reg_line_t          rl [REG_STAGES+1];
  logic [RBYTES*8-1:0] rb [REG_STAGES+1];
  logic [RBYTES-1:0]  rw [REG_STAGES+1];

  assign rv[0] = in_valid;
  assign rc[0] = in_chunk;
  assign rl[0] = in_regcfg;
  assign rb[0] = '0;
  assign rw[0] = '0;

  for (genvar s = 0; s < REG_STAGES; s++) begin : g_reg
    cr_stage #(.STACK_MODE(1'b0), .N_CFG(REG_STAGES), .IDX(s), .BUF_BYTES(RBYTES)) u_ext (
      .clk, .rst_n, .en,
      .in_valid (rv[s]),   .in_chunk (rc[s]),   .in_line (rl[s]),
      .in_buf   (rb[s]),   .in_we    (rw[s]),
      .out_valid(rv[s+1]), .out_chunk(rc[s+1]), .out_line(rl[s+1]),
      .out_buf  (rb[s+1]), .out_we   (rw[s+1])
    );
  end

  // delay element: aligns the registers pipeline with the stack pipeline
  logic [RBYTES*8-1:0] rd_buf;
  logic [RBYTES-1:0]   rd_we;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_buf <= '0;
      rd_we  <= '0;
    end else if (en) begin
      rd_buf <= rb[REG_STAGES];
      rd_we  <= rw[REG_STAGES];
    end
  end

  // ---------------- stack pipeline ----------------
  logic                     sv [STACK_STAGES+1];
  logic [CHUNK_W-1:0]       sc [STACK_STAGES+1];
  stack_line_t              sl [STACK_STAGES+1];
  logic [STACK_BYTES*8-1:0] sb [STACK_STAGES+1];
  logic [STACK_BYTES-1:0]   sw [STACK_STAGES+1];

  assign sv[0] = in_valid;
  assign sc[0] = in_chunk;
  assign sl[0] = in_stkcfg;
  assign sb[0] = '0;
  assign sw[0] = '0;

  for (genvar s = 0; s < STACK_STAGES; s++) begin : g_stk
    cr_stage #(.STACK_MODE(1'b1), .N_CFG(STACK_STAGES), .IDX(s), .BUF_BYTES(STACK_BYTES)) u_ext (
      .clk, .rst_n, .en,
      .in_valid (sv[s]),   .in_chunk (sc[s]),   .in_line (sl[s]),
      .in_buf   (sb[s]),   .in_we    (sw[s]),
      .out_valid(sv[s+1]), .out_chunk(sc[s+1]), .out_line(sl[s+1]),
      .out_buf  (sb[s+1]), .out_we   (sw[s+1])
    );
  end

  // ---------------- action / hit delay line ----------------
  action_t act_q [DEPTH];
  logic    hit_q [DEPTH];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        act_q[i] <= '0;
        hit_q[i] <= 1'b0;
      end
    end else if (en) begin
      act_q[0] <= in_action;
      hit_q[0] <= in_hit;
      for (int i = 1; i < DEPTH; i++) begin
        act_q[i] <= act_q[i-1];
        hit_q[i] <= hit_q[i-1];
      end
    end
  end

  always_comb begin
    out_valid       = sv[STACK_STAGES];
    out_ctx.hit     = hit_q[DEPTH-1];
    out_ctx.action  = act_q[DEPTH-1];
    out_ctx.stack   = sb[STACK_STAGES];
    out_ctx.stack_we = sw[STACK_STAGES];
    for (int r = 0; r < REG_STAGES; r++) begin
      out_ctx.regs[r]   = rd_buf[64*r +: 64];
      out_ctx.reg_we[r] = rd_we[8*r];
    end
  end

endmodule
