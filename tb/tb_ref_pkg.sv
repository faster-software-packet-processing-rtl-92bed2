// Reference model of the Warp Engine datapath, used by the testbenches.
//
// Written byte by byte over unpacked arrays, independently of the RTL's
// vector arithmetic: key building, TCAM priority lookup and the register /
// stack context a matched packet receives. Also holds small helpers to draw
// random configurations.
package tb_ref_pkg;
  import warp_pkg::*;

  typedef logic [7:0] byte_t;

  function automatic byte_t cbyte(input logic [CHUNK_W-1:0] chunk, input int i);
    if (i < 0 || i >= CHUNK_BYTES) return 8'h00;
    return chunk[i*8 +: 8];
  endfunction

  function automatic byte_t op_byte(input ext_op_e op, input byte_t d, input byte_t c);
    case (op)
      EXT_AND:   return d & c;
      EXT_OR:    return d | c;
      EXT_XOR:   return d ^ c;
      EXT_CONST: return c;
      default:   return 8'h00;
    endcase
  endfunction

  // key built by a chain of key extractor stages
  function automatic logic [KEY_W-1:0] ref_key(input logic [CHUNK_W-1:0] chunk,
                                               input ke_cfg_t cfg [], input int nst);
    byte_t kb [KEY_BYTES];
    int    koff, n;
    logic [KEY_W-1:0] key;
    foreach (kb[i]) kb[i] = 8'h00;
    koff = 0;
    for (int s = 0; s < nst; s++) begin
      if (cfg[s].op == EXT_NOP) continue;
      n = cfg[s].len > 2 ? 2 : int'(cfg[s].len);
      for (int k = 0; k < n; k++) begin
        if (koff + k < KEY_BYTES)
          kb[koff + k] = op_byte(cfg[s].op, cbyte(chunk, int'(cfg[s].off) + k), cfg[s].konst[8*k +: 8]);
      end
      koff = koff + n;
      if (koff > KEY_BYTES) koff = KEY_BYTES;
    end
    for (int i = 0; i < KEY_BYTES; i++) key[i*8 +: 8] = kb[i];
    return key;
  endfunction

  // lowest-index valid matching entry; returns -1 on miss
  function automatic int ref_tcam(input logic [KEY_W-1:0] key,
                                  input logic [KEY_W-1:0] val [],
                                  input logic [KEY_W-1:0] msk [],
                                  input bit vld []);
    for (int e = 0; e < val.size(); e++) begin
      bit ok;
      ok = vld[e];
      for (int b = 0; b < KEY_W; b++)
        if (msk[e][b] && (key[b] != val[e][b])) ok = 0;
      if (ok) return e;
    end
    return -1;
  endfunction

  // value one context extractor produces (register semantics)
  function automatic logic [63:0] ref_cr_value(input logic [CHUNK_W-1:0] chunk, input cr_cfg_t c);
    logic [63:0] v;
    int n;
    v = '0;
    if (c.op == EXT_CONST) return c.konst;
    n = c.len > 8 ? 8 : int'(c.len);
    for (int k = 0; k < n; k++)
      v[8*k +: 8] = op_byte(c.op, cbyte(chunk, int'(c.off) + k), c.konst[8*k +: 8]);
    return v;
  endfunction

  // register part of the context
  function automatic void ref_regs(input logic [CHUNK_W-1:0] chunk, input reg_line_t line,
                                   output logic [REG_STAGES-1:0][63:0] regs,
                                   output logic [REG_STAGES-1:0] we);
    for (int r = 0; r < REG_STAGES; r++) begin
      we[r]   = (line[r].op != EXT_NOP);
      regs[r] = we[r] ? ref_cr_value(chunk, line[r]) : 64'h0;
    end
  endfunction

  // stack part of the context; later stages overwrite earlier ones
  function automatic void ref_stack(input logic [CHUNK_W-1:0] chunk, input stack_line_t line,
                                    output logic [STACK_BYTES*8-1:0] stk,
                                    output logic [STACK_BYTES-1:0] we);
    stk = '0;
    we  = '0;
    for (int s = 0; s < STACK_STAGES; s++) begin
      int n;
      if (line[s].op == EXT_NOP) continue;
      n = line[s].len > 8 ? 8 : int'(line[s].len);
      for (int k = 0; k < n; k++) begin
        int a;
        a = int'(line[s].dst) + k;
        if (a < STACK_BYTES) begin
          stk[a*8 +: 8] = op_byte(line[s].op, cbyte(chunk, int'(line[s].off) + k), line[s].konst[8*k +: 8]);
          we[a] = 1'b1;
        end
      end
    end
  endfunction

  // full context for a packet, given the lookup result
  function automatic ctx_t ref_ctx(input logic [CHUNK_W-1:0] chunk, input int line,
                                   input action_t act, input reg_line_t rl, input stack_line_t sl);
    ctx_t c;
    c = '0;
    if (line < 0) begin
      c.hit = 1'b0;
      c.action.restore = 1'b1;
      return c;
    end
    c.hit    = 1'b1;
    c.action = act;
    if (act.restore) begin
      ref_regs(chunk, rl, c.regs, c.reg_we);
      ref_stack(chunk, sl, c.stack, c.stack_we);
    end
    return c;
  endfunction

  // ---------------- random helpers ----------------
  function automatic logic [CHUNK_W-1:0] rand_chunk();
    logic [CHUNK_W-1:0] c;
    for (int i = 0; i < CHUNK_W / 32; i++) c[32*i +: 32] = $urandom;
    return c;
  endfunction

  function automatic ext_op_e rand_op();
    return ext_op_e'($urandom_range(0, 4));
  endfunction

  function automatic cr_cfg_t rand_cr_cfg();
    cr_cfg_t c;
    c.op    = rand_op();
    c.len   = 4'($urandom_range(0, 9));
    c.off   = OFF_W'($urandom_range(0, CHUNK_BYTES - 1));
    c.konst = {$urandom, $urandom};
    c.dst   = SADDR_W'($urandom_range(0, STACK_BYTES - 1));
    return c;
  endfunction

  function automatic ke_cfg_t rand_ke_cfg();
    ke_cfg_t c;
    c.op    = rand_op();
    c.len   = 2'($urandom_range(0, 3));
    c.off   = OFF_W'($urandom_range(0, CHUNK_BYTES - 1));
    c.konst = 16'($urandom);
    return c;
  endfunction

endpackage
