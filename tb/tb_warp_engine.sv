// End-to-end testbench for warp_engine at its default sizes.
//
// An executor model takes the per-packet context and the packet beats with
// its own random backpressure. Three phases:
//   1. The L2 access-list example: the key is the EtherType (bytes 12-13);
//      IPv6 is dropped, IPv4 restores a context (PC 34, R1 = 0,
//      R2 = -8, stack bytes -8..-3 = source MAC) and anything else passes.
//      The executor never stalls here, so every context must arrive exactly
//      28 cycles after the beat that completes its packet's chunk.
//   2./3. Random key extractor and TCAM configurations with random action,
//      register and stack lines, random packets of 1 to 6 beats and random
//      stalls by the executor.
// Every context is compared with a byte-wise reference model and every beat
// leaving the packet data path with what entered. The mechanisms of the
// design are counted and each must occur: forwarding decision, context
// restore, TCAM miss, executor stall, single- and multi-beat packets,
// back-to-back chunks, and input backpressure from a full packet path.
module tb_warp_engine;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                         in_valid, in_ready, in_last;
  logic [BEAT_W-1:0]            in_data;
  logic [BEAT_BYTES-1:0]        in_keep;
  logic                         ke_cfg_we;
  logic [$clog2(KE_STAGES)-1:0] ke_cfg_idx;
  ke_cfg_t                      ke_cfg_data;
  logic                         tcam_we, tcam_valid;
  logic [LINE_W-1:0]            tcam_idx, line_idx;
  logic [KEY_W-1:0]             tcam_value, tcam_mask;
  logic                         act_we, regcfg_we, stkcfg_we;
  action_t                      act_data;
  reg_line_t                    regcfg_data;
  stack_line_t                  stkcfg_data;
  logic                         ctx_valid, ctx_ready;
  ctx_t                         ctx;
  logic                         pkt_valid, pkt_ready, pkt_last;
  logic [BEAT_W-1:0]            pkt_data;
  logic [BEAT_BYTES-1:0]        pkt_keep;

  warp_engine dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference configuration ----------------
  ke_cfg_t          kcfg [];
  logic [KEY_W-1:0] tval [], tmsk [];
  bit               tvld [];
  action_t          acts [TCAM_ENTRIES];
  reg_line_t        rls  [TCAM_ENTRIES];
  stack_line_t      sls  [TCAM_ENTRIES];

  task automatic set_ke(input int s, input ke_cfg_t c);
    @(negedge clk);
    ke_cfg_we = 1; ke_cfg_idx = s[$clog2(KE_STAGES)-1:0]; ke_cfg_data = c;
    @(negedge clk);
    ke_cfg_we = 0;
    kcfg[s] = c;
  endtask

  task automatic set_entry(input int e, input bit v, input logic [KEY_W-1:0] value,
                           input logic [KEY_W-1:0] mask, input action_t a,
                           input reg_line_t rl, input stack_line_t sl);
    @(negedge clk);
    tcam_we = 1; tcam_idx = e[LINE_W-1:0]; tcam_valid = v; tcam_value = value; tcam_mask = mask;
    act_we = 1; regcfg_we = 1; stkcfg_we = 1; line_idx = e[LINE_W-1:0];
    act_data = a; regcfg_data = rl; stkcfg_data = sl;
    @(negedge clk);
    tcam_we = 0; act_we = 0; regcfg_we = 0; stkcfg_we = 0;
    tvld[e] = v; tval[e] = value & mask; tmsk[e] = mask;
    acts[e] = a; rls[e] = rl; sls[e] = sl;
  endtask

  // ---------------- stimulus ----------------
  typedef byte_t pkt_t [];
  pkt_t txq [$];
  bit   gaps = 1;

  task automatic send_pkt(input pkt_t p);
    txq.push_back(p);
  endtask

  // driver: serialises queued packets into 64B beats
  initial begin
    in_valid = 0; in_last = 0; in_data = '0; in_keep = '0;
    wait (rst_n);
    @(negedge clk);
    forever begin
      if (txq.size() == 0) begin in_valid = 0; @(negedge clk); continue; end
      begin
        pkt_t p;
        int nb;
        p = txq.pop_front();
        nb = (p.size() + BEAT_BYTES - 1) / BEAT_BYTES;
        for (int b = 0; b < nb; b++) begin
          in_valid = 1;
          in_data = '0; in_keep = '0;
          for (int i = 0; i < BEAT_BYTES; i++)
            if (b * BEAT_BYTES + i < p.size()) begin
              in_data[8*i +: 8] = p[b * BEAT_BYTES + i];
              in_keep[i] = 1'b1;
            end
          in_last = (b == nb - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
          if (gaps && $urandom_range(0, 7) == 0) begin in_valid = 0; @(negedge clk); end
        end
      end
    end
  end

  // ---------------- monitors ----------------
  typedef struct { ctx_t c; longint t; } exp_t;
  exp_t ctxq [$];
  typedef struct { logic [BEAT_W-1:0] d; logic [BEAT_BYTES-1:0] k; logic l; } beat_t;
  beat_t beatq [$];

  longint cyc = 0;
  int beat_idx = 0;
  logic [CHUNK_W-1:0] cur_chunk;
  bit exact_latency = 0;
  longint last_chunk_cyc = -10;

  int n_fwd = 0, n_restore = 0, n_miss = 0, n_stall = 0, n_single = 0, n_multi = 0;
  int n_b2b = 0, n_backpressure = 0, n_ctx = 0, n_pkts = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ctx_valid && !ctx_ready) n_stall++;
      if (in_valid && !in_ready && !(ctx_valid && !ctx_ready)) n_backpressure++;
      if (in_valid && in_ready) begin
        logic [CHUNK_W-1:0] c;
        beatq.push_back('{in_data, in_keep, in_last});
        c = (beat_idx == 0) ? '0 : cur_chunk;
        if (beat_idx < 2)
          for (int b = 0; b < BEAT_BYTES; b++)
            c[8*(BEAT_BYTES*beat_idx + b) +: 8] = in_keep[b] ? in_data[8*b +: 8] : 8'h00;
        if (beat_idx == 1 || (beat_idx == 0 && in_last)) begin
          int line;
          line = ref_tcam(ref_key(c, kcfg, KE_STAGES), tval, tmsk, tvld);
          ctxq.push_back('{ref_ctx(c, line, line >= 0 ? acts[line] : '0,
                                   line >= 0 ? rls[line] : '0, line >= 0 ? sls[line] : '0), cyc});
          if (cyc == last_chunk_cyc + 1) n_b2b++;
          last_chunk_cyc = cyc;
        end
        if (in_last) begin
          if (beat_idx == 0) n_single++; else n_multi++;
        end
        cur_chunk = c;
        beat_idx = in_last ? 0 : beat_idx + 1;
      end
      // executor model: take the context
      if (ctx_valid && ctx_ready) begin
        exp_t e;
        n_ctx++;
        checks++;
        if (ctxq.size() == 0) begin failures++; $display("unexpected context"); end
        else begin
          e = ctxq.pop_front();
          if (!ctx.hit) n_miss++;
          else if (ctx.action.restore) n_restore++;
          else n_fwd++;
          if (ctx !== e.c) begin
            failures++;
            if (failures < 10) $display("context mismatch: hit %0b/%0b restore %0b/%0b r0 %0d/%0d pc %0d/%0d regs %0b stack %0b",
              ctx.hit, e.c.hit, ctx.action.restore, e.c.action.restore, ctx.action.r0, e.c.action.r0,
              ctx.action.pc, e.c.action.pc, ctx.regs == e.c.regs && ctx.reg_we == e.c.reg_we,
              ctx.stack == e.c.stack && ctx.stack_we == e.c.stack_we);
          end
          // the context becomes visible in cycle cyc; the chunk beat was taken at e.t
          if ((exact_latency && cyc - e.t != 28) || cyc - e.t < 28) begin
            failures++;
            if (failures < 10) $display("latency %0d", cyc - e.t);
          end
        end
      end
      // executor model: take the packet beats
      if (pkt_valid && pkt_ready) begin
        beat_t e;
        checks++;
        if (beatq.size() == 0) begin failures++; $display("unexpected beat"); end
        else begin
          e = beatq.pop_front();
          if (pkt_data !== e.d || pkt_keep !== e.k || pkt_last !== e.l) begin
            failures++;
            if (failures < 10) $display("packet beat mismatch");
          end
          if (pkt_last) n_pkts++;
        end
      end
    end
  end

  // executor readiness
  int ready_mode = 0;   // 0: always ready, 1: random
  always @(negedge clk) begin
    ctx_ready <= (ready_mode == 0) ? 1'b1 : ($urandom_range(0, 2) == 0);
    pkt_ready <= (ready_mode == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
  end

  function automatic pkt_t rand_pkt(input int len);
    pkt_t p;
    p = new[len];
    foreach (p[i]) p[i] = 8'($urandom);
    return p;
  endfunction

  task automatic drain();
    int idle;
    idle = 0;
    while (idle < 60) begin
      @(negedge clk);
      if (txq.size() == 0 && !in_valid && ctxq.size() == 0 && beatq.size() == 0) idle++;
      else idle = 0;
      if (cyc > 1900000) break;
    end
  endtask

  function automatic cr_cfg_t crc(input ext_op_e op, input int len, input int off,
                                  input logic [63:0] k, input int dst);
    cr_cfg_t c;
    c.op = op; c.len = 4'(len); c.off = OFF_W'(off); c.konst = k; c.dst = SADDR_W'(dst);
    return c;
  endfunction

  initial begin
    kcfg = new[KE_STAGES];
    tval = new[TCAM_ENTRIES]; tmsk = new[TCAM_ENTRIES]; tvld = new[TCAM_ENTRIES];
    foreach (kcfg[i]) kcfg[i] = '0;
    foreach (tvld[i]) begin tvld[i] = 0; tval[i] = '0; tmsk[i] = '0; end
    ke_cfg_we = 0; ke_cfg_idx = '0; ke_cfg_data = '0;
    tcam_we = 0; tcam_idx = '0; tcam_valid = 0; tcam_value = '0; tcam_mask = '0;
    act_we = 0; regcfg_we = 0; stkcfg_we = 0; line_idx = '0;
    act_data = '0; regcfg_data = '0; stkcfg_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- phase 1: L2 ACL ----------------
    begin
      reg_line_t   rl;
      stack_line_t sl;
      action_t     a;
      logic [KEY_W-1:0] m;
      set_ke(0, '{op: EXT_AND, len: 2'd2, off: OFF_W'(12), konst: 16'hFFFF});
      m = '0; m[15:0] = 16'hFFFF;
      // IPv6 -> drop
      set_entry(0, 1, {112'h0, 16'hDD86}, m, '{restore: 1'b0, r0: XDP_DROP, pc: '0}, '0, '0);
      // IPv4 -> restore context
      rl = '0;
      rl[0] = crc(EXT_CONST, 0, 0, 64'h0, 0);                  // R1 = 0
      rl[1] = crc(EXT_CONST, 0, 0, 64'hFFFF_FFFF_FFFF_FFF8, 0); // R2 = -8
      sl = '0;
      sl[0] = crc(EXT_AND, 6, 6, 64'hFFFF_FFFF_FFFF_FFFF, STACK_BYTES - 8); // stack[-8..-3] = P[6:12]
      a = '{restore: 1'b1, r0: '0, pc: PC_W'(34)};
      set_entry(1, 1, {112'h0, 16'h0008}, m, a, rl, sl);
      // anything else -> pass
      set_entry(2, 1, '0, '0, '{restore: 1'b0, r0: XDP_PASS, pc: '0}, '0, '0);
      ready_mode = 0; gaps = 0; exact_latency = 1;
      for (int i = 0; i < 60; i++) begin
        pkt_t p;
        p = rand_pkt($urandom_range(60, 200));
        case (i % 3)
          0: begin p[12] = 8'h86; p[13] = 8'hDD; end
          1: begin p[12] = 8'h08; p[13] = 8'h00; end
          default: begin p[12] = 8'h08; p[13] = 8'h06; end
        endcase
        send_pkt(p);
      end
      // a burst of minimum-size packets: one chunk per cycle
      for (int i = 0; i < 30; i++) begin
        pkt_t p;
        p = rand_pkt(64);
        p[12] = 8'h08; p[13] = (i % 2) ? 8'h00 : 8'h06;
        send_pkt(p);
      end
      drain();
      // spot check of the example's decisions
      checks++;
      if (n_fwd != 55 || n_restore != 35) begin
        failures++; $display("L2 ACL: %0d forwards, %0d restores", n_fwd, n_restore);
      end
      exact_latency = 0; gaps = 1;
    end

    // ---------------- phases 2/3: random programs ----------------
    for (int round = 0; round < 2; round++) begin
      ready_mode = 1;
      for (int s = 0; s < KE_STAGES; s++) begin
        ke_cfg_t c;
        c = rand_ke_cfg();
        c.off = OFF_W'($urandom_range(0, 40));
        if ($urandom_range(0, 2) != 0) c.op = EXT_AND;
        set_ke(s, c);
      end
      for (int e = 0; e < TCAM_ENTRIES; e++) begin
        reg_line_t rl; stack_line_t sl; action_t a; logic [KEY_W-1:0] m, v;
        for (int s = 0; s < REG_STAGES; s++) rl[s] = rand_cr_cfg();
        for (int s = 0; s < STACK_STAGES; s++) sl[s] = rand_cr_cfg();
        a = '{restore: 1'($urandom), r0: 64'($urandom_range(0, 4)), pc: PC_W'($urandom)};
        m = '0;
        m[8*$urandom_range(0, 15) +: 8] = $urandom_range(0, 1) ? 8'hFF : 8'h0F;
        v = {$urandom, $urandom, $urandom, $urandom};
        set_entry(e, $urandom_range(0, 3) != 0, v, m, a, rl, sl);
      end
      for (int i = 0; i < 300; i++) send_pkt(rand_pkt($urandom_range(40, 380)));
      drain();
    end

    // ---------------- summary ----------------
    checks++;
    if (ctxq.size() != 0 || beatq.size() != 0) begin
      failures++; $display("left over: %0d contexts, %0d beats", ctxq.size(), beatq.size());
    end
    $display("contexts %0d packets %0d | forward %0d restore %0d miss %0d | stall cycles %0d | single-beat %0d multi-beat %0d | back-to-back chunks %0d | input backpressure %0d",
             n_ctx, n_pkts, n_fwd, n_restore, n_miss, n_stall, n_single, n_multi, n_b2b, n_backpressure);
    checks++; if (n_fwd == 0)          begin failures++; $display("no forwarding decision"); end
    checks++; if (n_restore == 0)      begin failures++; $display("no context restore"); end
    checks++; if (n_miss == 0)         begin failures++; $display("no TCAM miss"); end
    checks++; if (n_stall == 0)        begin failures++; $display("no executor stall"); end
    checks++; if (n_single == 0)       begin failures++; $display("no single-beat packet"); end
    checks++; if (n_multi == 0)        begin failures++; $display("no multi-beat packet"); end
    checks++; if (n_b2b == 0)          begin failures++; $display("no back-to-back chunks"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no input backpressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
