// mips_lite_ref_pkg: testbench-only reference for the MIPS-lite CPU.
//
// Holds an instruction encoder (one function per instruction), a random
// program generator and an instruction-set simulator (class mips_lite_iss)
// that executes the register transfers of ADDU, SUBU, ORI, LW, SW and BEQ
// directly, independently of the RTL. The simulator models the same memory
// conventions as the RTL: byte addresses, word accesses, index = address
// bits [log2(words)+1:2], and register 0 fixed at zero. Any other
// instruction is a no-op.
package mips_lite_ref_pkg;

  // ---- encoder --------------------------------------------------------
  function automatic logic [31:0] enc_r(logic [5:0] funct, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] addu(int rd, int rs, int rt); return enc_r(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt); return enc_r(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] ori (int rt, int rs, int imm); return enc_i(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] lw  (int rt, int imm, int rs); return enc_i(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw  (int rt, int imm, int rs); return enc_i(6'h2B, rt, rs, imm); endfunction
  // beq offset in words, counted from the instruction after the branch
  function automatic logic [31:0] beq (int rs, int rt, int off); return enc_i(6'h04, rt, rs, off); endfunction

  // Random instruction: mostly MIPS-lite, sometimes an unknown encoding.
  // Branch offsets are short and forward (the program wraps around the
  // instruction memory, so it repeats without getting stuck); register numbers are drawn from 0..7 so that
  // operands repeat and BEQ is often taken.
  function automatic logic [31:0] random_instr();
    int rd = $urandom_range(0, 7);
    int rs = $urandom_range(0, 7);
    int rt = $urandom_range(0, 7);
    case ($urandom_range(0, 12))
      0, 1:    return addu(rd, rs, rt);
      2, 3:    return subu(rd, rs, rt);
      4, 5:    return ori(rt, rs, $urandom_range(0, 16'hFFFF));
      6, 7:    return lw(rt, $urandom_range(0, 16'hFFFF) & 16'hFFFC, rs);
      8, 9:    return sw(rt, $urandom_range(0, 16'hFFFF) & 16'hFFFC, rs);
      10, 11:  return beq(rs, rt, $urandom_range(0, 4));
      default: return {6'h3F, 26'($urandom)};
    endcase
  endfunction

  // ---- instruction-set simulator --------------------------------------
  typedef enum int {K_ADDU, K_SUBU, K_ORI, K_LW, K_SW, K_BEQ_TAKEN, K_BEQ_NOT, K_NOP, K_NKINDS} kind_e;

  class mips_lite_iss;
    int unsigned  dwords;
    logic [31:0]  pc;
    logic [31:0]  r [32];
    logic [31:0]  dmem [];
    // effects of the last step
    kind_e        kind;
    logic         st_we;
    logic [31:0]  st_addr;
    logic [31:0]  st_data;
    logic         r0_target;   // an instruction tried to write register 0

    function new(int unsigned words);
      dwords = words;
      dmem = new[words];
      foreach (r[i]) r[i] = '0;
      pc = '0;
    endfunction

    function int unsigned idx(logic [31:0] a);
      return (a >> 2) % dwords;
    endfunction

    function void step(logic [31:0] w);
      logic [5:0]  op  = w[31:26];
      int          rs  = int'(w[25:21]);
      int          rt  = int'(w[20:16]);
      int          rd  = int'(w[15:11]);
      logic [5:0]  fn  = w[5:0];
      logic [31:0] se  = {{16{w[15]}}, w[15:0]};
      logic [31:0] ze  = {16'h0, w[15:0]};
      logic [31:0] nxt = pc + 4;
      st_we = 0; r0_target = 0; kind = K_NOP;
      if (op == 6'h00 && fn == 6'h21) begin
        kind = K_ADDU; r0_target = (rd == 0); if (rd != 0) r[rd] = r[rs] + r[rt];
      end else if (op == 6'h00 && fn == 6'h23) begin
        kind = K_SUBU; r0_target = (rd == 0); if (rd != 0) r[rd] = r[rs] - r[rt];
      end else if (op == 6'h0D) begin
        kind = K_ORI; r0_target = (rt == 0); if (rt != 0) r[rt] = r[rs] | ze;
      end else if (op == 6'h23) begin
        kind = K_LW; r0_target = (rt == 0); if (rt != 0) r[rt] = dmem[idx(r[rs] + se)];
      end else if (op == 6'h2B) begin
        kind = K_SW; st_we = 1; st_addr = r[rs] + se; st_data = r[rt];
        dmem[idx(st_addr)] = st_data;
      end else if (op == 6'h04) begin
        if (r[rs] == r[rt]) begin
          kind = K_BEQ_TAKEN; nxt = pc + 4 + {se[29:0], 2'b00};
        end else begin
          kind = K_BEQ_NOT;
        end
      end
      pc = nxt;
    endfunction
  endclass

endpackage
