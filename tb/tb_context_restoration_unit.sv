// Testbench for context_restoration_unit: a stream of packets, each with its
// own random register and stack configuration lines, action and hit flag,
// under random stalls. Checks the rebuilt R1-R9, stack image and write
// enables against the reference, that action and hit travel unchanged, and
// the ten-cycle latency of both pipelines.
module tb_context_restoration_unit;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic               in_valid, in_hit, out_valid;
  action_t            in_action;
  reg_line_t          in_regcfg;
  stack_line_t        in_stkcfg;
  logic [CHUNK_W-1:0] in_chunk;
  ctx_t               out_ctx;

  context_restoration_unit dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { ctx_t c; int t; } exp_t;
  exp_t q [$];
  int encnt = 0;
  bit last_en = 0;

  always @(posedge clk) if (rst_n) begin
    last_en <= en;
    if (en) begin
      if (in_valid) begin
        ctx_t c;
        c = '0;
        c.hit = in_hit;
        c.action = in_action;
        ref_regs(in_chunk, in_regcfg, c.regs, c.reg_we);
        ref_stack(in_chunk, in_stkcfg, c.stack, c.stack_we);
        q.push_back('{c, encnt});
      end
      encnt <= encnt + 1;
    end
  end

  always @(negedge clk) if (rst_n && last_en && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (out_ctx !== e.c || encnt - e.t != STACK_STAGES) begin
        failures++;
        if (failures < 10) $display("mismatch: regs %0b/%0b stack %0b/%0b act %0b lat %0d",
          out_ctx.regs == e.c.regs, out_ctx.reg_we == e.c.reg_we,
          out_ctx.stack == e.c.stack, out_ctx.stack_we == e.c.stack_we,
          out_ctx.action == e.c.action, encnt - e.t);
      end
    end
  end

  initial begin
    en = 1; in_valid = 0; in_hit = 0; in_action = '0; in_regcfg = '0; in_stkcfg = '0; in_chunk = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_hit   = 1'($urandom);
      in_action = '{restore: 1'($urandom), r0: {$urandom, $urandom}, pc: PC_W'($urandom)};
      for (int s = 0; s < REG_STAGES; s++)   in_regcfg[s] = rand_cr_cfg();
      for (int s = 0; s < STACK_STAGES; s++) in_stkcfg[s] = rand_cr_cfg();
      in_chunk = rand_chunk();
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
    end
    in_valid = 0; en = 1;
    repeat (STACK_STAGES + 3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d contexts never came out", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
