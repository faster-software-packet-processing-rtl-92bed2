// Shared sizes, encodings and line formats of the Warp Engine.
//
// The Warp Engine sits between a NIC's receive queue and an on-FPGA eBPF
// executor (hXDP). It reads a few bit vectors from the first bytes of every
// packet, matches them in a TCAM and either returns the program's forwarding
// decision directly or rebuilds the program context (PC, R1-R9, stack) that
// the executor resumes from. The sizes below are the configuration of
// Table 5 of the design: 128B packet chunk, 16B lookup key, 12 key extractor
// stages reading 2B each, 64 TCAM entries, 9 register and 10 stack extractor
// stages reading 8B each, and a 136B stack buffer.
//
// Encodings that the design leaves open are chosen here:
//   * Bytes are numbered as on the wire; the chunk, the key and the stack
//     buffer keep byte i at bits [8*i +: 8]. A multi-byte read from the
//     chunk is assembled little-endian (byte at the read offset is the least
//     significant), as an eBPF load on a little-endian executor would.
//   * The extractor operation is one of ext_op_e. EXT_NOP leaves the stage
//     idle, EXT_CONST writes the constant alone, AND/OR/XOR combine the
//     extracted bytes with the constant.
//   * Stack buffer byte i stands for stack address R10 - STACK_BYTES + i.
//   * The program counter is PC_W bits wide.
package warp_pkg;

  // Datapath into the engine (Corundum-style 64B beats).
  localparam int unsigned BEAT_BYTES   = 64;
  // Table 5 configuration.
  localparam int unsigned CHUNK_BYTES  = 128;
  localparam int unsigned KEY_BYTES    = 16;
  localparam int unsigned KE_STAGES    = 12;
  localparam int unsigned KE_READ      = 2;
  localparam int unsigned TCAM_ENTRIES = 64;
  localparam int unsigned REG_STAGES   = 9;
  localparam int unsigned STACK_STAGES = 10;
  localparam int unsigned CR_READ      = 8;
  localparam int unsigned STACK_BYTES  = 136;
  // Chosen widths.
  localparam int unsigned PC_W         = 16;

  localparam int unsigned CHUNK_W      = CHUNK_BYTES * 8;
  localparam int unsigned KEY_W        = KEY_BYTES * 8;
  localparam int unsigned BEAT_W       = BEAT_BYTES * 8;
  localparam int unsigned OFF_W        = $clog2(CHUNK_BYTES);
  localparam int unsigned KOFF_W       = $clog2(KEY_BYTES + 1);
  localparam int unsigned SADDR_W      = $clog2(STACK_BYTES);
  localparam int unsigned LINE_W       = $clog2(TCAM_ENTRIES);

  // XDP return codes (Linux ABI).
  localparam logic [63:0] XDP_ABORTED  = 64'd0;
  localparam logic [63:0] XDP_DROP     = 64'd1;
  localparam logic [63:0] XDP_PASS     = 64'd2;
  localparam logic [63:0] XDP_TX       = 64'd3;
  localparam logic [63:0] XDP_REDIRECT = 64'd4;

  typedef enum logic [2:0] {
    EXT_NOP   = 3'd0,
    EXT_AND   = 3'd1,
    EXT_OR    = 3'd2,
    EXT_XOR   = 3'd3,
    EXT_CONST = 3'd4
  } ext_op_e;

  // Key extractor stage configuration (same for every packet).
  typedef struct packed {
    ext_op_e          op;
    logic [1:0]       len;     // bytes read and written, 0..KE_READ
    logic [OFF_W-1:0] off;     // read offset in the chunk
    logic [15:0]      konst;   // 2B constant
  } ke_cfg_t;

  // Context restoration extractor configuration (one per stage and line).
  typedef struct packed {
    ext_op_e            op;
    logic [3:0]         len;   // bytes read from the chunk, 0..CR_READ
    logic [OFF_W-1:0]   off;   // read offset in the chunk
    logic [63:0]        konst; // 8B constant
    logic [SADDR_W-1:0] dst;   // stack byte address (stack stages only)
  } cr_cfg_t;

  typedef cr_cfg_t [REG_STAGES-1:0]   reg_line_t;
  typedef cr_cfg_t [STACK_STAGES-1:0] stack_line_t;

  // Action memory line.
  typedef struct packed {
    logic            restore;  // 0: forwarding decision, 1: context restore
    logic [63:0]     r0;       // R0 value (XDP action code when forwarding)
    logic [PC_W-1:0] pc;       // resume PC for a context restore
  } action_t;

  // Context handed to the executor, one per packet.
  typedef struct packed {
    logic                         hit;       // a TCAM entry matched
    action_t                      action;
    logic [REG_STAGES-1:0]        reg_we;    // bit i: R(i+1) restored
    logic [REG_STAGES-1:0][63:0]  regs;      // [i] is R(i+1)
    logic [STACK_BYTES-1:0]       stack_we;  // byte write enables
    logic [STACK_BYTES*8-1:0]     stack;     // stack bytes
  } ctx_t;

  // Little-endian read of up to 8 bytes from a chunk at a byte offset.
  // Bytes past the end of the chunk read as zero.
  function automatic logic [63:0] chunk_read(input logic [CHUNK_W-1:0] chunk,
                                             input logic [OFF_W-1:0] off,
                                             input logic [3:0] len);
    logic [63:0] v;
    v = '0;
    for (int k = 0; k < 8; k++) begin
      if (k < int'(len) && int'(off) + k < CHUNK_BYTES)
        v[8*k +: 8] = chunk[8*(int'(off) + k) +: 8];
    end
    return v;
  endfunction

  // Apply an extractor operation; the result is masked to len bytes except
  // for EXT_CONST, which yields the full constant.
  function automatic logic [63:0] ext_apply(input ext_op_e op,
                                            input logic [63:0] data,
                                            input logic [63:0] konst,
                                            input logic [3:0] len);
    logic [63:0] r, m;
    m = '0;
    for (int k = 0; k < 8; k++)
      if (k < int'(len)) m[8*k +: 8] = 8'hFF;
    unique case (op)
      EXT_AND:   r = (data & konst) & m;
      EXT_OR:    r = (data | konst) & m;
      EXT_XOR:   r = (data ^ konst) & m;
      EXT_CONST: r = konst;
      default:   r = '0;
    endcase
    return r;
  endfunction

endpackage
