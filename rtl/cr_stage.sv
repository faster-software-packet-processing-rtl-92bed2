// One Context Restoration Unit extractor stage.
//
// The stage uses entry IDX of the configuration line that travels with its
// packet (cr_cfg_t): it reads up to CR_READ (8) bytes of the packet chunk
// at cfg.off, combines them with the 8B constant (ext_op_e) and writes the
// result into the context buffer that also travels with the packet. In
// register mode (STACK_MODE = 0) the buffer holds one 8B slot per register
// and the stage fills slot IDX with the whole 64-bit value: loads are zero
// extended and EXT_CONST loads the full constant. In stack mode the buffer
// is the stack image and the stage writes cfg.len bytes at byte address
// cfg.dst, clipped at the end of the buffer. EXT_NOP writes nothing. A
// per-byte write-enable vector records which bytes were restored.
//
// Chunk, configuration line, buffer and enables are registered and passed
// to the next stage: one enabled cycle per stage.
//
// Reading up to 8B, the operation with a constant and carrying the line
// along follow the design; the buffer layout, byte order and operation set
// are this implementation's own.
module cr_stage
  import warp_pkg::*;
#(
  parameter bit          STACK_MODE = 1'b0,
  parameter int unsigned N_CFG      = REG_STAGES,
  parameter int unsigned IDX        = 0,
  parameter int unsigned BUF_BYTES  = REG_STAGES * 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       in_valid,
  input  logic [CHUNK_W-1:0]         in_chunk,
  input  cr_cfg_t [N_CFG-1:0]        in_line,
  input  logic [BUF_BYTES*8-1:0]     in_buf,
  input  logic [BUF_BYTES-1:0]       in_we,
  output logic                       out_valid,
  output logic [CHUNK_W-1:0]         out_chunk,
  output cr_cfg_t [N_CFG-1:0]        out_line,
  output logic [BUF_BYTES*8-1:0]     out_buf,
  output logic [BUF_BYTES-1:0]       out_we
);

  cr_cfg_t                 cfg;
  logic [3:0]              rlen, wlen;
  logic [63:0]             rd, val;
  int unsigned             base;
  logic [BUF_BYTES*8-1:0]  buf_n;
  logic [BUF_BYTES-1:0]    we_n;

  always_comb begin
    cfg  = in_line[IDX];
    rlen = (cfg.len > 4'(CR_READ)) ? 4'(CR_READ) : cfg.len;
    rd   = chunk_read(in_chunk, cfg.off, rlen);
    val  = ext_apply(cfg.op, rd, cfg.konst, rlen);
    if (STACK_MODE) begin
      base = int'(cfg.dst);
      wlen = rlen;
    end else begin
      base = IDX * 8;
      wlen = 4'd8;
    end
    if (cfg.op == EXT_NOP) wlen = 4'd0;
    buf_n = in_buf;
    we_n  = in_we;
    for (int k = 0; k < 8; k++) begin
      if (k < int'(wlen) && base + k < BUF_BYTES) begin
        buf_n[8*(base + k) +: 8] = val[8*k +: 8];
        we_n[base + k]           = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_chunk <= '0;
      out_line  <= '0;
      out_buf   <= '0;
      out_we    <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_chunk <= in_chunk;
      out_line  <= in_line;
      out_buf   <= buf_n;
      out_we    <= we_n;
    end
  end

endmodule
