// Testbench for line_memory at the stack configuration line width: random
// writes and reads against an array model, checking the one-cycle read
// latency and that the read register holds while en is low.
module tb_line_memory;
  import warp_pkg::*;

  localparam int W = $bits(stack_line_t);
  localparam int L = TCAM_ENTRIES;

  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;

  logic                 wr_en;
  logic [$clog2(L)-1:0] wr_addr, rd_addr;
  logic [W-1:0]         wr_data, rd_data;

  line_memory #(.WIDTH(W), .LINES(L)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [L];
  logic [W-1:0] expect_q;

  function automatic logic [W-1:0] rline();
    logic [W-1:0] v;
    for (int i = 0; i < (W + 31) / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    en = 1; wr_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int l = 0; l < L; l++) begin
      wr_en = 1; wr_addr = l[$clog2(L)-1:0]; wr_data = rline(); model[l] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    expect_q = '0;
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] prev;
      prev    = rd_data;
      rd_addr = $urandom_range(0, L - 1);
      en      = ($urandom_range(0, 3) != 0);
      wr_en   = ($urandom_range(0, 3) == 0);
      wr_addr = $urandom_range(0, L - 1);
      wr_data = rline();
      expect_q = en ? model[rd_addr] : prev;
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expect_q) begin
        failures++;
        if (failures < 10) $display("t=%0d addr %0d en %0b mismatch", t, rd_addr, en);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
