// Testbench for pkt_fifo: random pushes and pops against a queue model,
// including runs to full and to empty. Checks order, contents, the full
// flag (in_ready) at DEPTH beats and out_valid on empty.
module tb_pkt_fifo;
  import warp_pkg::*;

  localparam int D = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [BEAT_W-1:0]     in_data, out_data;
  logic [BEAT_BYTES-1:0] in_keep, out_keep;

  pkt_fifo #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, fulls = 0, empties = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [BEAT_W-1:0] d; logic [BEAT_BYTES-1:0] k; logic l; } beat_t;
  beat_t q [$];

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; in_keep = '0; in_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int phase;
      @(negedge clk);
      phase = (t / 300) % 3;   // 0: fill-biased, 1: drain-biased, 2: balanced
      in_valid  = ($urandom_range(0, 9) < (phase == 0 ? 9 : phase == 1 ? 2 : 5));
      out_ready = ($urandom_range(0, 9) < (phase == 1 ? 9 : phase == 0 ? 2 : 5));
      for (int i = 0; i < BEAT_W / 32; i++) in_data[32*i +: 32] = $urandom;
      in_keep = {$urandom, $urandom};
      in_last = 1'($urandom);
      #1;
      checks++;
      if (in_ready !== (q.size() < D) || out_valid !== (q.size() > 0)) begin
        failures++;
        if (failures < 10) $display("flags wrong: size %0d ready %0b valid %0b", q.size(), in_ready, out_valid);
      end
      if (q.size() == D) fulls++;
      if (q.size() == 0) empties++;
      if (out_valid && out_ready) begin
        beat_t e;
        e = q.pop_front();
        checks++;
        if (out_data !== e.d || out_keep !== e.k || out_last !== e.l) begin
          failures++;
          if (failures < 10) $display("data mismatch t=%0d", t);
        end
      end
      if (in_valid && in_ready) q.push_back('{in_data, in_keep, in_last});
    end
    checks++;
    if (fulls == 0 || empties == 0) begin failures++; $display("full %0d empty %0d", fulls, empties); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
