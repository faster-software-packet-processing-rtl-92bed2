// One Key Extractor stage.
//
// Reads up to KE_READ (2) bytes of the packet chunk at the configured
// offset, combines them bitwise with a 2B constant (ext_op_e) and writes the
// result into the lookup key at the running key offset. The stage then
// passes on, registered: the modified key, the key offset advanced by the
// number of bytes written, the packet chunk and the valid bit. EXT_NOP makes
// the stage write nothing and leave the offset unchanged. Bytes that would
// land past the end of the key are dropped.
//
// The configuration (cfg) is static for all packets and written at run
// time. One clock cycle per stage, advancing only when en is high.
//
// What the stage reads, combines and passes on follows the design; the
// operation set, the byte order and the offset arithmetic are this
// implementation's own.
module ke_stage
  import warp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  ke_cfg_t             cfg,
  input  logic                in_valid,
  input  logic [CHUNK_W-1:0]  in_chunk,
  input  logic [KEY_W-1:0]    in_key,
  input  logic [KOFF_W-1:0]   in_koff,
  output logic                out_valid,
  output logic [CHUNK_W-1:0]  out_chunk,
  output logic [KEY_W-1:0]    out_key,
  output logic [KOFF_W-1:0]   out_koff
);

  logic [63:0]       rd, val;
  logic [3:0]        nbytes;
  logic [KEY_W-1:0]  key_n;
  logic [KOFF_W-1:0] koff_n;

  always_comb begin
    nbytes = (cfg.op == EXT_NOP) ? 4'd0
           : (cfg.len > 2'(KE_READ)) ? 4'(KE_READ) : {2'b00, cfg.len};
    rd     = chunk_read(in_chunk, cfg.off, nbytes);
    val    = ext_apply(cfg.op, rd, {48'h0, cfg.konst}, nbytes);
    key_n  = in_key;
    for (int k = 0; k < KE_READ; k++) begin
      if (k < int'(nbytes) && int'(in_koff) + k < KEY_BYTES)
        key_n[8*(int'(in_koff) + k) +: 8] = val[8*k +: 8];
    end
    if (int'(in_koff) + int'(nbytes) > KEY_BYTES) koff_n = KOFF_W'(KEY_BYTES);
    else                                          koff_n = in_koff + KOFF_W'(nbytes);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_chunk <= '0;
      out_key   <= '0;
      out_koff  <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_chunk <= in_chunk;
      out_key   <= key_n;
      out_koff  <= koff_n;
    end
  end

endmodule
