// Testbench for pkt_splitter: random packets of 1 to 5 beats with partial
// last beats, random stalls on en and pd_ready. Checks that every accepted
// beat is passed to the data path unchanged and only then, that exactly one
// chunk per packet comes out holding the packet's first 128 bytes (zero
// beyond the packet), and that it comes two enabled cycles after the beat
// that completes it.
module tb_pkt_splitter;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic                  in_valid, in_ready, in_last, pd_valid, pd_ready, pd_last, chunk_valid;
  logic [BEAT_W-1:0]     in_data, pd_data;
  logic [BEAT_BYTES-1:0] in_keep, pd_keep;
  logic [CHUNK_W-1:0]    chunk;

  pkt_splitter dut (.*);

  int checks = 0, failures = 0, n_short = 0;
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [CHUNK_W-1:0] c; int t; } exp_t;
  exp_t q [$];
  int encnt = 0;
  bit last_en = 0;
  logic [CHUNK_W-1:0] cur;
  int beat = 0;

  // reference chunk assembly at accepted beats
  always @(posedge clk) if (rst_n) begin
    last_en <= en;
    if (en) encnt <= encnt + 1;
    if (in_valid && in_ready) begin
      logic [CHUNK_W-1:0] c;
      c = (beat == 0) ? '0 : cur;
      if (beat < 2)
        for (int b = 0; b < BEAT_BYTES; b++)
          c[8*(64*beat + b) +: 8] = in_keep[b] ? in_data[8*b +: 8] : 8'h00;
      if ((beat == 1) || (beat == 0 && in_last)) q.push_back('{c, encnt});
      cur = c;
      beat = in_last ? 0 : beat + 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    // data path: passes exactly the accepted beats
    checks++;
    if ((pd_valid && pd_ready) !== (in_valid && in_ready) || pd_data !== in_data ||
        pd_keep !== in_keep || pd_last !== in_last || in_ready !== (en && pd_ready)) begin
      failures++;
      if (failures < 10) $display("data path mismatch");
    end
    if (last_en && chunk_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected chunk"); end
      else begin
        e = q.pop_front();
        if (chunk !== e.c || encnt - e.t != 2) begin
          failures++;
          if (failures < 10) $display("chunk mismatch, latency %0d", encnt - e.t);
        end
      end
    end
  end

  initial begin
    en = 1; in_valid = 0; in_last = 0; in_data = '0; in_keep = '0; pd_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 400; p++) begin
      int nb, lastbytes;
      nb = $urandom_range(1, 5);
      if (nb == 1) n_short++;
      lastbytes = $urandom_range(1, 64);
      for (int b = 0; b < nb; b++) begin
        in_valid = 1;
        for (int i = 0; i < BEAT_W / 32; i++) in_data[32*i +: 32] = $urandom;
        in_last = (b == nb - 1);
        in_keep = in_last ? BEAT_BYTES'((65'd1 << lastbytes) - 1) : '1;
        do begin
          en       = ($urandom_range(0, 4) != 0);
          pd_ready = ($urandom_range(0, 5) != 0);
          @(negedge clk);
        end while (!(en && pd_ready));
        if ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
      end
    end
    in_valid = 0; en = 1; pd_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_short == 0) begin failures++; $display("%0d chunks missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
