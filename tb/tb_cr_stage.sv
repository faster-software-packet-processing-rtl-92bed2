// Testbench for cr_stage in both modes: a register stage (slot 3 of the
// nine) and a stack stage (entry 5 of the ten). Random lines, chunks and
// incoming buffers; the buffer and enables one cycle later are compared with
// the byte-wise reference applied to the incoming buffer. Also checks that
// the outputs hold while en is low.
module tb_cr_stage;
  import warp_pkg::*;
  import tb_ref_pkg::*;

  localparam int RB = REG_STAGES * 8;
  localparam int RI = 3;
  localparam int SI = 5;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic               in_valid, r_ov, s_ov;
  logic [CHUNK_W-1:0] in_chunk, r_oc, s_oc;
  reg_line_t          r_line, r_ol;
  stack_line_t        s_line, s_ol;
  logic [RB*8-1:0]    r_buf, r_ob;
  logic [RB-1:0]      r_we, r_owe;
  logic [STACK_BYTES*8-1:0] s_buf, s_ob;
  logic [STACK_BYTES-1:0]   s_we, s_owe;

  cr_stage #(.STACK_MODE(1'b0), .N_CFG(REG_STAGES), .IDX(RI), .BUF_BYTES(RB)) dut_reg (
    .clk, .rst_n, .en, .in_valid, .in_chunk, .in_line(r_line), .in_buf(r_buf), .in_we(r_we),
    .out_valid(r_ov), .out_chunk(r_oc), .out_line(r_ol), .out_buf(r_ob), .out_we(r_owe));

  cr_stage #(.STACK_MODE(1'b1), .N_CFG(STACK_STAGES), .IDX(SI), .BUF_BYTES(STACK_BYTES)) dut_stk (
    .clk, .rst_n, .en, .in_valid, .in_chunk, .in_line(s_line), .in_buf(s_buf), .in_we(s_we),
    .out_valid(s_ov), .out_chunk(s_oc), .out_line(s_ol), .out_buf(s_ob), .out_we(s_owe));

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RB*8-1:0] er; logic [RB-1:0] erw;
    logic [STACK_BYTES*8-1:0] es, es1; logic [STACK_BYTES-1:0] esw, esw1;
    stack_line_t only;
    en = 1; in_valid = 0; in_chunk = '0; r_line = '0; s_line = '0; r_buf = '0; r_we = '0; s_buf = '0; s_we = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      in_chunk = rand_chunk();
      for (int s = 0; s < REG_STAGES; s++)   r_line[s] = rand_cr_cfg();
      for (int s = 0; s < STACK_STAGES; s++) s_line[s] = rand_cr_cfg();
      for (int i = 0; i < RB / 4; i++) r_buf[32*i +: 32] = $urandom;
      for (int i = 0; i < STACK_BYTES / 4; i++) s_buf[32*i +: 32] = $urandom;
      r_we = {$urandom, $urandom, $urandom}; s_we = {$urandom, $urandom, $urandom, $urandom, $urandom};
      // register expectation: slot RI replaced when the op is not NOP
      er = r_buf; erw = r_we;
      if (r_line[RI].op != EXT_NOP) begin
        er[64*RI +: 64] = ref_cr_value(in_chunk, r_line[RI]);
        erw[8*RI +: 8]  = 8'hFF;
      end
      // stack expectation: apply entry SI alone on top of the incoming buffer
      only = '0; only[SI] = s_line[SI];
      ref_stack(in_chunk, only, es1, esw1);
      es = s_buf; esw = s_we;
      for (int b = 0; b < STACK_BYTES; b++) if (esw1[b]) begin es[8*b +: 8] = es1[8*b +: 8]; esw[b] = 1'b1; end
      @(posedge clk); #1;
      checks += 2;
      if (r_ob !== er || r_owe !== erw || r_ol !== r_line || r_oc !== in_chunk || r_ov !== in_valid) begin
        failures++;
        if (failures < 10) $display("reg mismatch t=%0d op=%0d len=%0d", t, r_line[RI].op, r_line[RI].len);
      end
      if (s_ob !== es || s_owe !== esw || s_ol !== s_line || s_oc !== in_chunk || s_ov !== in_valid) begin
        failures++;
        if (failures < 10) $display("stack mismatch t=%0d op=%0d len=%0d dst=%0d", t, s_line[SI].op, s_line[SI].len, s_line[SI].dst);
      end
      if (t % 5 == 0) begin
        @(negedge clk);
        en = 0; r_buf = ~r_buf; s_buf = ~s_buf;
        @(posedge clk); #1;
        checks++;
        if (r_ob !== er || s_ob !== es) begin failures++; $display("hold failed t=%0d", t); end
        en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
