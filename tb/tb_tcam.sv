// Testbench for tcam: 64 random ternary entries (some invalid, some
// overlapping so that priority matters), keys drawn from entries or at
// random, random stalls. Checks hit/line against a linear-search reference
// and the two-cycle latency, and that rewriting an entry takes effect.
module tb_tcam;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = TCAM_ENTRIES;
  localparam int SBW = 32;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic                 wr_en, wr_valid, in_valid, out_valid, out_hit;
  logic [$clog2(N)-1:0] wr_idx, out_line;
  logic [KEY_W-1:0]     wr_value, wr_mask, in_key;
  logic [SBW-1:0]       in_sb, out_sb;

  tcam #(.ENTRIES(N), .SB_W(SBW)) dut (.*);

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

  typedef struct { int line; logic [SBW-1:0] sb; int t; } exp_t;
  exp_t q [$];
  int encnt = 0, hits = 0, misses = 0;
  bit last_en = 0;

  always @(posedge clk) if (rst_n) begin
    last_en <= en;
    if (en) begin
      if (in_valid) q.push_back('{ref_tcam(in_key, val, msk, vld), in_sb, encnt});
      encnt <= encnt + 1;
    end
  end

  always @(negedge clk) if (rst_n && last_en && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (e.line < 0) misses++; else hits++;
      if (out_hit !== (e.line >= 0) || (e.line >= 0 && int'(out_line) != e.line) ||
          out_sb !== e.sb || encnt - e.t != 2) begin
        failures++;
        if (failures < 10) $display("mismatch: hit %0b line %0d want %0d lat %0d", out_hit, out_line, e.line, encnt - e.t);
      end
    end
  end

  function automatic logic [KEY_W-1:0] rkey();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic write_entry(input int e, input bit v, input logic [KEY_W-1:0] value, input logic [KEY_W-1:0] mask);
    wr_en = 1; wr_idx = e[$clog2(N)-1:0]; wr_valid = v; wr_value = value; wr_mask = mask;
    @(posedge clk);
    vld[e] = v; val[e] = value; msk[e] = mask;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    val = new[N]; msk = new[N]; vld = new[N];
    foreach (vld[i]) begin vld[i] = 0; val[i] = '0; msk[i] = '0; end
    en = 1; in_valid = 0; in_key = '0; in_sb = '0; wr_en = 0; wr_idx = '0; wr_valid = 0; wr_value = '0; wr_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < N; e++) begin
      logic [KEY_W-1:0] m;
      // masks: a few 16-bit fields cared for; the last entry is a catch-all
      m = '0;
      for (int f = 0; f < 8; f++) if ($urandom_range(0, 2) == 0) m[16*f +: 16] = 16'hFFFF;
      if (m == '0) m[15:0] = 16'hFFFF;
      if (e == N - 1) m = '0;
      write_entry(e, $urandom_range(0, 5) != 0 && e != N - 1, rkey(), m);
    end
    for (int round = 0; round < 3; round++) begin
      for (int t = 0; t < 1500; t++) begin
        int e;
        e = $urandom_range(0, N - 1);
        in_valid = ($urandom_range(0, 3) != 0);
        in_sb    = $urandom;
        case ($urandom_range(0, 2))
          0: in_key = rkey();
          default: in_key = (val[e] & msk[e]) | (rkey() & ~msk[e]);
        endcase
        en = ($urandom_range(0, 4) != 0);
        @(negedge clk);
      end
      in_valid = 0; en = 1;
      repeat (4) @(negedge clk);
      // change the table: catch-all valid on the last pass
      write_entry(N - 1, round == 1, '0, '0);
      write_entry($urandom_range(0, N - 2), 1, rkey(), {KEY_W{1'b1}});
    end
    in_valid = 0; en = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || hits == 0 || misses == 0) begin
      failures++; $display("left %0d hits %0d misses %0d", q.size(), hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
