// Workload testbench for warp_engine at its default sizes: one rule set per
// evaluated application, sized as that application's published needs
// (TCAM entries, lookup key bytes, maximum stack bytes):
//   L2 ACL 3/2/6, Router 9/4/8, Tunnel 7/4/24, DNAT 6/6/40,
//   Suricata 49/12/40, Katran 20/16/80.
// The programs themselves are not reproduced: each rule set is synthetic.
// The key is built from key-size/2 extractor stages reading consecutive
// header bytes. Every entry but the last matches one exact key; the last is
// a catch-all PASS. Even entries restore a context with stack-size bytes of
// stack (one stack stage per 8B) and two registers. Odd entries forward.
// For each application a back-to-back stream of 64B packets hits every
// entry. Every context is checked against the reference model. Every entry
// must be hit. The stream must leave the engine at one context per cycle,
// 28 cycles after the beat that completed the chunk, as the executor never
// stalls here. A last run repeats the largest rule set with 65B packets,
// which need two beats each and so leave one context every two cycles.
module tb_warp_workloads;
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

  assign ctx_ready = 1'b1;
  assign pkt_ready = 1'b1;

  int checks = 0, failures = 0;
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ke_cfg_t          kcfg [];
  logic [KEY_W-1:0] tval [], tmsk [];
  bit               tvld [];
  action_t          acts [TCAM_ENTRIES];
  reg_line_t        rls  [TCAM_ENTRIES];
  stack_line_t      sls  [TCAM_ENTRIES];
  int               hits [TCAM_ENTRIES];

  typedef struct { ctx_t c; longint t; int line; } exp_t;
  exp_t   ctxq [$];
  longint cyc = 0, first_out, last_out;
  int     n_out = 0;
  logic [CHUNK_W-1:0] mon_acc = '0;
  int     mon_beat = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
      logic [CHUNK_W-1:0] c;
      int line;
      c = mon_acc;
      for (int b = 0; b < BEAT_BYTES; b++)
        c[8*(BEAT_BYTES*mon_beat + b) +: 8] = in_keep[b] ? in_data[8*b +: 8] : 8'h00;
      if (in_last) begin
        line = ref_tcam(ref_key(c, kcfg, KE_STAGES), tval, tmsk, tvld);
        ctxq.push_back('{ref_ctx(c, line, line >= 0 ? acts[line] : '0, line >= 0 ? rls[line] : '0,
                                 line >= 0 ? sls[line] : '0), cyc, line});
        mon_acc  <= '0;
        mon_beat <= 0;
      end else begin
        // packets here are at most two beats, so the second beat completes the chunk
        mon_acc  <= c;
        mon_beat <= 1;
      end
    end
    if (rst_n && ctx_valid) begin
      exp_t e;
      checks++;
      if (n_out == 0) first_out = cyc;
      last_out = cyc;
      n_out++;
      if (ctxq.size() == 0) begin failures++; $display("unexpected context"); end
      else begin
        e = ctxq.pop_front();
        if (e.line >= 0) hits[e.line]++;
        if (ctx !== e.c || cyc - e.t != 28) begin
          failures++;
          if (failures < 10) $display("mismatch line %0d latency %0d", e.line, cyc - e.t);
        end
      end
    end
  end

  task automatic run_app(input string name, input int entries, input int keyb, input int stackb,
                         input int pkt_bytes = 64);
    int nst, npk;
    // key extractor: keyb/2 stages over consecutive bytes from offset 14
    nst = (keyb + 1) / 2;
    for (int s = 0; s < KE_STAGES; s++) begin
      ke_cfg_t c;
      c = (s < nst) ? '{op: EXT_AND, len: 2'd2, off: OFF_W'(14 + 2*s), konst: 16'hFFFF} : '0;
      @(negedge clk);
      ke_cfg_we = 1; ke_cfg_idx = s[$clog2(KE_STAGES)-1:0]; ke_cfg_data = c;
      kcfg[s] = c;
    end
    @(negedge clk); ke_cfg_we = 0;
    foreach (tvld[i]) tvld[i] = 0;
    for (int e = 0; e < TCAM_ENTRIES; e++) hits[e] = 0;
    for (int e = 0; e < TCAM_ENTRIES; e++) begin
      logic [KEY_W-1:0] v, m;
      action_t a; reg_line_t rl; stack_line_t sl;
      v = {$urandom, $urandom, $urandom, $urandom};
      m = '0;
      for (int b = 0; b < keyb; b++) m[8*b +: 8] = 8'hFF;
      if (e == entries - 1) m = '0;
      rl = '0; sl = '0;
      if (e % 2 == 0 && e != entries - 1) begin
        a = '{restore: 1'b1, r0: '0, pc: PC_W'(100 + e)};
        rl[0] = '{op: EXT_CONST, len: 4'd0, off: '0, konst: 64'(e), dst: '0};
        rl[1] = '{op: EXT_AND, len: 4'd4, off: OFF_W'(26), konst: '1, dst: '0};
        for (int j = 0; j < (stackb + 7) / 8; j++)
          sl[j] = '{op: EXT_AND, len: 4'((stackb - 8*j) > 8 ? 8 : stackb - 8*j), off: OFF_W'(8*j),
                    konst: '1, dst: SADDR_W'(STACK_BYTES - stackb + 8*j)};
      end else begin
        a = '{restore: 1'b0, r0: (e == entries - 1) ? XDP_PASS : XDP_DROP, pc: '0};
      end
      @(negedge clk);
      tcam_we = 1; tcam_idx = e[LINE_W-1:0]; tcam_valid = (e < entries); tcam_value = v; tcam_mask = m;
      act_we = 1; regcfg_we = 1; stkcfg_we = 1; line_idx = e[LINE_W-1:0];
      act_data = a; regcfg_data = rl; stkcfg_data = sl;
      tvld[e] = (e < entries); tval[e] = v & m; tmsk[e] = m; acts[e] = a; rls[e] = rl; sls[e] = sl;
    end
    @(negedge clk);
    tcam_we = 0; act_we = 0; regcfg_we = 0; stkcfg_we = 0;
    // back-to-back 64B packets: each entry hit twice, plus misses of the exact entries
    n_out = 0;
    npk = 2 * entries + 8;
    for (int p = 0; p < npk; p++) begin
      int e;
      e = p % (entries + 4);
      for (int beat = 0; beat * BEAT_BYTES < pkt_bytes; beat++) begin
        int rem;
        rem = pkt_bytes - beat * BEAT_BYTES;
        in_valid = 1;
        in_last  = (rem <= BEAT_BYTES);
        in_keep  = (rem >= BEAT_BYTES) ? '1 : BEAT_BYTES'((65'(1) << rem) - 1);
        for (int i = 0; i < BEAT_W / 32; i++) in_data[32*i +: 32] = $urandom;
        if (beat == 0 && e < entries - 1)
          for (int b = 0; b < keyb; b++) in_data[8*(14 + b) +: 8] = tval[e][8*b +: 8];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    for (int e = 0; e < entries; e++) if (hits[e] == 0) begin
      failures++; $display("%s: entry %0d never hit", name, e);
    end
    checks++;
    if (n_out != npk || last_out - first_out != longint'((pkt_bytes + int'(BEAT_BYTES) - 1) / int'(BEAT_BYTES) * (npk - 1))) begin
      failures++; $display("%s: %0d contexts over %0d cycles for %0d packets", name, n_out, last_out - first_out + 1, npk);
    end
    $display("%s: %0d entries, %0dB key, %0dB stack: %0d packets of %0dB, %0d cycles from first to last context",
             name, entries, keyb, stackb, npk, pkt_bytes, last_out - first_out + 1);
  endtask

  initial begin
    kcfg = new[KE_STAGES];
    tval = new[TCAM_ENTRIES]; tmsk = new[TCAM_ENTRIES]; tvld = new[TCAM_ENTRIES];
    foreach (kcfg[i]) kcfg[i] = '0;
    foreach (tvld[i]) begin tvld[i] = 0; tval[i] = '0; tmsk[i] = '0; end
    in_valid = 0; in_last = 0; in_data = '0; in_keep = '0;
    ke_cfg_we = 0; ke_cfg_idx = '0; ke_cfg_data = '0;
    tcam_we = 0; tcam_idx = '0; tcam_valid = 0; tcam_value = '0; tcam_mask = '0;
    act_we = 0; regcfg_we = 0; stkcfg_we = 0; line_idx = '0;
    act_data = '0; regcfg_data = '0; stkcfg_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_app("L2 ACL",    3,  2,  6);
    run_app("Router",    9,  4,  8);
    run_app("Tunnel",    7,  4, 24);
    run_app("DNAT",      6,  6, 40);
    run_app("Suricata", 49, 12, 40);
    run_app("Katran",   20, 16, 80);
    // packets one byte longer than the datapath: two beats each, so one
    // context every two cycles
    run_app("Katran 65B", 20, 16, 80, 65);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
