// Key Extractor: a chain of N_STAGES ke_stage extractors (12 by default).
//
// The chunk enters with an all-zero lookup key and key offset 0; each stage
// appends the bytes it extracts, so the key is the concatenation, in stage
// order, of what the configured stages read. The per-stage configuration
// is written at run time through cfg_we/cfg_idx/cfg_data and applies to
// every following packet. Latency is N_STAGES enabled cycles; one chunk
// can enter per cycle.
//
// The 12 stages, 2B reads and 16B key follow the design; the configuration
// write port and its reset value (all stages EXT_NOP) are this
// implementation's own.
module key_extractor
  import warp_pkg::*;
#(
  parameter int unsigned N_STAGES = KE_STAGES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  // runtime configuration
  input  logic                        cfg_we,
  input  logic [$clog2(N_STAGES)-1:0] cfg_idx,
  input  ke_cfg_t                     cfg_data,
  // chunk in
  input  logic                        in_valid,
  input  logic [CHUNK_W-1:0]          in_chunk,
  // key out, with the chunk it came from
  output logic                        out_valid,
  output logic [CHUNK_W-1:0]          out_chunk,
  output logic [KEY_W-1:0]            out_key
);

  ke_cfg_t cfg [N_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STAGES; s++) cfg[s] <= '0;
    end else if (cfg_we) begin
      cfg[cfg_idx] <= cfg_data;
    end
  end

  logic               v [N_STAGES+1];
  logic [CHUNK_W-1:0] c [N_STAGES+1];
  logic [KEY_W-1:0]   k [N_STAGES+1];
  logic [KOFF_W-1:0]  o [N_STAGES+1];

  assign v[0] = in_valid;
  assign c[0] = in_chunk;
  assign k[0] = '0;
  assign o[0] = '0;

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    ke_stage u_stage (
      .clk, .rst_n, .en,
      .cfg      (cfg[s]),
      .in_valid (v[s]),   .in_chunk (c[s]),   .in_key (k[s]),   .in_koff (o[s]),
      .out_valid(v[s+1]), .out_chunk(c[s+1]), .out_key(k[s+1]), .out_koff(o[s+1])
    );
  end

  assign out_valid = v[N_STAGES];
  assign out_chunk = c[N_STAGES];
  assign out_key   = k[N_STAGES];

endmodule
