// Testbench for match_action_unit: random TCAM entries with random action,
// register and stack configuration lines (forwarding and restore actions),
// random keys and stalls. Checks the selected lines against the reference
// lookup, that forwarding actions carry idle configuration lines, that a
// miss yields the not-warped result, and the three-cycle latency.
module tb_match_action_unit;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = TCAM_ENTRIES;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic                 tcam_we, tcam_valid, act_we, regcfg_we, stkcfg_we;
  logic [$clog2(N)-1:0] tcam_idx, line_idx;
  logic [KEY_W-1:0]     tcam_value, tcam_mask, in_key;
  action_t              act_data, out_action;
  reg_line_t            regcfg_data, out_regcfg;
  stack_line_t          stkcfg_data, out_stkcfg;
  logic                 in_valid, out_valid, out_hit;
  logic [CHUNK_W-1:0]   in_chunk, out_chunk;

  match_action_unit dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KEY_W-1:0] val [], msk [];
  bit               vld [];
  action_t          acts [N];
  reg_line_t        rls [N];
  stack_line_t      sls [N];

  typedef struct { int line; logic [CHUNK_W-1:0] chunk; int t; } exp_t;
  exp_t q [$];
  int encnt = 0, n_fwd = 0, n_rst = 0, n_miss = 0;
  bit last_en = 0;

  always @(posedge clk) if (rst_n) begin
    last_en <= en;
    if (en) begin
      if (in_valid) q.push_back('{ref_tcam(in_key, val, msk, vld), in_chunk, encnt});
      encnt <= encnt + 1;
    end
  end

  always @(negedge clk) if (rst_n && last_en && out_valid) begin
    exp_t e;
    action_t ea; reg_line_t er; stack_line_t es;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (e.line < 0) begin
        n_miss++;
        ea = '0; ea.restore = 1'b1; er = '0; es = '0;
      end else begin
        ea = acts[e.line];
        if (ea.restore) begin n_rst++; er = rls[e.line]; es = sls[e.line]; end
        else begin n_fwd++; er = '0; es = '0; end
      end
      if (out_hit !== (e.line >= 0) || out_action !== ea || out_regcfg !== er ||
          out_stkcfg !== es || out_chunk !== e.chunk || encnt - e.t != 3) begin
        failures++;
        if (failures < 10) $display("mismatch line %0d hit %0b lat %0d", e.line, out_hit, encnt - e.t);
      end
    end
  end

  initial begin
    val = new[N]; msk = new[N]; vld = new[N];
    en = 1; in_valid = 0; in_key = '0; in_chunk = '0;
    tcam_we = 0; tcam_valid = 0; tcam_idx = '0; tcam_value = '0; tcam_mask = '0;
    act_we = 0; regcfg_we = 0; stkcfg_we = 0; line_idx = '0;
    act_data = '0; regcfg_data = '0; stkcfg_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < N; e++) begin
      act_data.restore = 1'($urandom);
      act_data.r0      = 64'($urandom_range(0, 4));
      act_data.pc      = PC_W'($urandom);
      for (int s = 0; s < REG_STAGES; s++)   regcfg_data[s] = rand_cr_cfg();
      for (int s = 0; s < STACK_STAGES; s++) stkcfg_data[s] = rand_cr_cfg();
      tcam_value = {$urandom, $urandom, $urandom, $urandom};
      tcam_mask  = '0;
      tcam_mask[8*($urandom_range(0, 15)) +: 8] = 8'hFF;
      tcam_mask[8*($urandom_range(0, 15)) +: 8] = 8'hFF;
      tcam_valid = ($urandom_range(0, 7) != 0);
      tcam_we = 1; act_we = 1; regcfg_we = 1; stkcfg_we = 1;
      tcam_idx = e[$clog2(N)-1:0]; line_idx = e[$clog2(N)-1:0];
      @(posedge clk);
      val[e] = tcam_value & tcam_mask; msk[e] = tcam_mask; vld[e] = tcam_valid;
      acts[e] = act_data; rls[e] = regcfg_data; sls[e] = stkcfg_data;
      @(negedge clk);
    end
    tcam_we = 0; act_we = 0; regcfg_we = 0; stkcfg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      int e;
      e = $urandom_range(0, N - 1);
      in_valid = ($urandom_range(0, 3) != 0);
      in_chunk = rand_chunk();
      in_key   = ($urandom_range(0, 3) == 0) ? {$urandom, $urandom, $urandom, $urandom}
                                              : (val[e] | ({$urandom, $urandom, $urandom, $urandom} & ~msk[e]));
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
    end
    in_valid = 0; en = 1;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_fwd == 0 || n_rst == 0 || n_miss == 0) begin
      failures++; $display("left %0d fwd %0d restore %0d miss %0d", q.size(), n_fwd, n_rst, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
