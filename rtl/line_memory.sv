// Configuration line memory: LINES lines of WIDTH bits, one line per TCAM
// entry. The engine uses three of them, read in parallel at the matched
// line number: the Action Memory (action_t), the Registers Configuration
// Memory (reg_line_t) and the Stack Configuration Memory (stack_line_t).
//
// One write port (runtime configuration) and one synchronous read port: the
// line addressed by rd_addr appears on rd_data one enabled cycle later and
// holds while en is low. The array itself is not reset (it maps onto block
// RAM): a line must be written before the TCAM entry that selects it is
// made valid. The read register resets to zero.
//
// The three memories and their line-per-entry organisation follow the
// design; the one-write/one-read organisation and the reset are this
// implementation's own.
module line_memory #(
  parameter int unsigned WIDTH = 81,
  parameter int unsigned LINES = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     wr_en,
  input  logic [$clog2(LINES)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [$clog2(LINES)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);

  logic [WIDTH-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd_data <= '0;
    else if (en) rd_data <= mem[rd_addr];
  end

endmodule
