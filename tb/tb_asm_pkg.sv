// tb_asm_pkg: MIPS64 instruction encoders for the testbenches, so test
// programs can be written as readable sequences of calls.
package tb_asm_pkg;
  function automatic logic [31:0] r_type(input int rs, rt, rd, sa, fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sa), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(input int op, rs, rt, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] NOP();                    return 32'd0; endfunction
  function automatic logic [31:0] ADDIU(input int rt, rs, imm);  return i_type(9, rs, rt, imm); endfunction
  function automatic logic [31:0] DADDIU(input int rt, rs, imm); return i_type(25, rs, rt, imm); endfunction
  function automatic logic [31:0] ORI(input int rt, rs, imm);    return i_type(13, rs, rt, imm); endfunction
  function automatic logic [31:0] ANDI(input int rt, rs, imm);   return i_type(12, rs, rt, imm); endfunction
  function automatic logic [31:0] LUI(input int rt, imm);        return i_type(15, 0, rt, imm); endfunction
  function automatic logic [31:0] SLTI(input int rt, rs, imm);   return i_type(10, rs, rt, imm); endfunction
  function automatic logic [31:0] ADDU(input int rd, rs, rt);    return r_type(rs, rt, rd, 0, 'h21); endfunction
  function automatic logic [31:0] DADDU(input int rd, rs, rt);   return r_type(rs, rt, rd, 0, 'h2D); endfunction
  function automatic logic [31:0] DSUBU(input int rd, rs, rt);   return r_type(rs, rt, rd, 0, 'h2F); endfunction
  function automatic logic [31:0] SUBU(input int rd, rs, rt);    return r_type(rs, rt, rd, 0, 'h23); endfunction
  function automatic logic [31:0] OR_(input int rd, rs, rt);     return r_type(rs, rt, rd, 0, 'h25); endfunction
  function automatic logic [31:0] AND_(input int rd, rs, rt);    return r_type(rs, rt, rd, 0, 'h24); endfunction
  function automatic logic [31:0] XOR_(input int rd, rs, rt);    return r_type(rs, rt, rd, 0, 'h26); endfunction
  function automatic logic [31:0] NOR_(input int rd, rs, rt);    return r_type(rs, rt, rd, 0, 'h27); endfunction
  function automatic logic [31:0] SLT(input int rd, rs, rt);     return r_type(rs, rt, rd, 0, 'h2A); endfunction
  function automatic logic [31:0] SLTU(input int rd, rs, rt);    return r_type(rs, rt, rd, 0, 'h2B); endfunction
  function automatic logic [31:0] SLL(input int rd, rt, sa);     return r_type(0, rt, rd, sa, 'h00); endfunction
  function automatic logic [31:0] SRA(input int rd, rt, sa);     return r_type(0, rt, rd, sa, 'h03); endfunction
  function automatic logic [31:0] SRLV(input int rd, rt, rs);    return r_type(rs, rt, rd, 0, 'h06); endfunction
  function automatic logic [31:0] DSLL(input int rd, rt, sa);    return r_type(0, rt, rd, sa, 'h38); endfunction
  function automatic logic [31:0] DSRL(input int rd, rt, sa);    return r_type(0, rt, rd, sa, 'h3A); endfunction
  function automatic logic [31:0] DSLL32(input int rd, rt, sa);  return r_type(0, rt, rd, sa, 'h3C); endfunction
  function automatic logic [31:0] DSRA32(input int rd, rt, sa);  return r_type(0, rt, rd, sa, 'h3F); endfunction
  function automatic logic [31:0] JR(input int rs);              return r_type(rs, 0, 0, 0, 'h08); endfunction
  function automatic logic [31:0] JALR(input int rd, rs);        return r_type(rs, 0, rd, 0, 'h09); endfunction
  function automatic logic [31:0] SYSCALL();                     return r_type(0, 0, 0, 0, 'h0C); endfunction
  function automatic logic [31:0] MFHI(input int rd);            return r_type(0, 0, rd, 0, 'h10); endfunction
  function automatic logic [31:0] MFLO(input int rd);            return r_type(0, 0, rd, 0, 'h12); endfunction
  function automatic logic [31:0] MTHI(input int rs);            return r_type(rs, 0, 0, 0, 'h11); endfunction
  function automatic logic [31:0] MULT(input int rs, rt);        return r_type(rs, rt, 0, 0, 'h18); endfunction
  function automatic logic [31:0] DIV(input int rs, rt);         return r_type(rs, rt, 0, 0, 'h1A); endfunction
  function automatic logic [31:0] DMULTU(input int rs, rt);      return r_type(rs, rt, 0, 0, 'h1D); endfunction
  function automatic logic [31:0] DDIVU(input int rs, rt);       return r_type(rs, rt, 0, 0, 'h1F); endfunction
  function automatic logic [31:0] BEQ(input int rs, rt, off);    return i_type(4, rs, rt, off); endfunction
  function automatic logic [31:0] BNE(input int rs, rt, off);    return i_type(5, rs, rt, off); endfunction
  function automatic logic [31:0] BGEZ(input int rs, off);       return i_type(1, rs, 1, off); endfunction
  function automatic logic [31:0] J(input logic [63:0] target);  return {6'd2, target[27:2]}; endfunction
  function automatic logic [31:0] JAL(input logic [63:0] target); return {6'd3, target[27:2]}; endfunction
  function automatic logic [31:0] LD(input int rt, off, base);   return i_type(55, base, rt, off); endfunction
  function automatic logic [31:0] LW(input int rt, off, base);   return i_type(35, base, rt, off); endfunction
  function automatic logic [31:0] LWU(input int rt, off, base);  return i_type(39, base, rt, off); endfunction
  function automatic logic [31:0] LH(input int rt, off, base);   return i_type(33, base, rt, off); endfunction
  function automatic logic [31:0] LB(input int rt, off, base);   return i_type(32, base, rt, off); endfunction
  function automatic logic [31:0] LBU(input int rt, off, base);  return i_type(36, base, rt, off); endfunction
  function automatic logic [31:0] SD(input int rt, off, base);   return i_type(63, base, rt, off); endfunction
  function automatic logic [31:0] SW(input int rt, off, base);   return i_type(43, base, rt, off); endfunction
  function automatic logic [31:0] SH(input int rt, off, base);   return i_type(41, base, rt, off); endfunction
  function automatic logic [31:0] SB(input int rt, off, base);   return i_type(40, base, rt, off); endfunction
  function automatic logic [31:0] MFC0(input int rt, rd);        return {6'd16, 5'd0, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] DMFC0(input int rt, rd);       return {6'd16, 5'd1, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] MTC0(input int rt, rd);        return {6'd16, 5'd4, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] DMTC0(input int rt, rd);       return {6'd16, 5'd5, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] TLBR();  return {6'd16, 1'b1, 19'd0, 6'h01}; endfunction
  function automatic logic [31:0] TLBWI(); return {6'd16, 1'b1, 19'd0, 6'h02}; endfunction
  function automatic logic [31:0] TLBWR(); return {6'd16, 1'b1, 19'd0, 6'h06}; endfunction
  function automatic logic [31:0] TLBP();  return {6'd16, 1'b1, 19'd0, 6'h08}; endfunction
  function automatic logic [31:0] ERET();  return {6'd16, 1'b1, 19'd0, 6'h18}; endfunction
endpackage
