// Testbench for ke_stage: random configurations, chunks, keys and key
// offsets; each result is compared with the byte-wise reference one cycle
// later. Also checks that the stage holds its outputs while en is low.
module tb_ke_stage;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  ke_cfg_t            cfg;
  logic               in_valid, out_valid;
  logic [CHUNK_W-1:0] in_chunk, out_chunk;
  logic [KEY_W-1:0]   in_key, out_key;
  logic [KOFF_W-1:0]  in_koff, out_koff;

  ke_stage dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KEY_W-1:0]  ekey;
    int                eoff, n;
    ke_cfg_t           one [];
    en = 1; in_valid = 0; cfg = '0; in_chunk = '0; in_key = '0; in_koff = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one = new[1];
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      cfg      = rand_ke_cfg();
      in_chunk = rand_chunk();
      in_key   = {$urandom, $urandom, $urandom, $urandom};
      in_koff  = KOFF_W'($urandom_range(0, KEY_BYTES));
      in_valid = 1'($urandom);
      // expected: start from the incoming key, apply this stage alone
      ekey = in_key;
      n = (cfg.op == EXT_NOP) ? 0 : (cfg.len > 2 ? 2 : int'(cfg.len));
      for (int k = 0; k < n; k++)
        if (int'(in_koff) + k < KEY_BYTES)
          ekey[8*(int'(in_koff)+k) +: 8] = op_byte(cfg.op, cbyte(in_chunk, int'(cfg.off)+k), cfg.konst[8*k +: 8]);
      eoff = int'(in_koff) + n;
      if (eoff > KEY_BYTES) eoff = KEY_BYTES;
      @(posedge clk); #1;
      checks++;
      if (out_key !== ekey || int'(out_koff) != eoff || out_chunk !== in_chunk || out_valid !== in_valid) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d op=%0d len=%0d off=%0d koff=%0d: got %h/%0d want %h/%0d",
                                    t, cfg.op, cfg.len, cfg.off, in_koff, out_key, out_koff, ekey, eoff);
      end
      // hold check: with en low, outputs stay
      if (t % 7 == 0) begin
        @(negedge clk);
        en = 0; in_key = ~in_key; in_valid = ~in_valid;
        @(posedge clk); #1;
        checks++;
        if (out_key !== ekey || out_valid === in_valid) begin
          failures++;
          $display("hold failed t=%0d", t);
        end
        en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
