// Testbench for key_extractor: several random configurations of the 12
// stages, a stream of random chunks with gaps and random stalls (en low).
// Each key is compared with the byte-wise reference, and each result must
// appear exactly KE_STAGES enabled cycles after its chunk entered.
module tb_key_extractor;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic                         cfg_we;
  logic [$clog2(KE_STAGES)-1:0] cfg_idx;
  ke_cfg_t                      cfg_data;
  logic                         in_valid, out_valid;
  logic [CHUNK_W-1:0]           in_chunk, out_chunk;
  logic [KEY_W-1:0]             out_key;

  key_extractor dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [KEY_W-1:0] key; logic [CHUNK_W-1:0] chunk; int t; } exp_t;
  exp_t q [$];
  ke_cfg_t cur [];
  int encnt = 0;
  bit last_en = 0;

  always @(posedge clk) if (rst_n) begin
    last_en <= en;
    if (en) begin
      if (in_valid) q.push_back('{ref_key(in_chunk, cur, KE_STAGES), in_chunk, encnt});
      encnt <= encnt + 1;
    end
  end

  always @(negedge clk) if (rst_n && last_en && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      e = q.pop_front();
      if (out_key !== e.key || out_chunk !== e.chunk || encnt - e.t != KE_STAGES) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h want %h, latency %0d", out_key, e.key, encnt - e.t);
      end
    end
  end

  initial begin
    cur = new[KE_STAGES];
    en = 1; in_valid = 0; in_chunk = '0; cfg_we = 0; cfg_idx = '0; cfg_data = '0;
    foreach (cur[i]) cur[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 8; round++) begin
      // drain, then reconfigure
      @(negedge clk); in_valid = 0; en = 1;
      repeat (KE_STAGES + 2) @(negedge clk);
      for (int s = 0; s < KE_STAGES; s++) begin
        cfg_we = 1; cfg_idx = s[$clog2(KE_STAGES)-1:0];
        cfg_data = (round == 0) ? '{op: EXT_AND, len: 2'd2, off: OFF_W'(12 + 2*s), konst: 16'hFFFF} : rand_ke_cfg();
        @(posedge clk); cur[s] = cfg_data;
        @(negedge clk);
      end
      cfg_we = 0;
      for (int t = 0; t < 200; t++) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_chunk = rand_chunk();
        en       = ($urandom_range(0, 4) != 0);
        @(negedge clk);
      end
    end
    in_valid = 0; en = 1;
    repeat (KE_STAGES + 3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d keys never came out", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
