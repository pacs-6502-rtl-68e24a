// pacs_ref_pkg: instruction-level reference model of the PACS 6502 for the
// testbenches.
//
// Ref6502 executes one instruction per call of step() on its own copy of the
// 64 KiB memory and returns the number of clock cycles the instruction takes
// on the 6502. It is written from the instruction set, by opcode value, and
// shares no code with the RTL. Opcodes outside the implemented set execute as
// one-byte, two-cycle no-operations. Binary arithmetic only (no decimal mode).
// It also counts how often each opcode ran and how often an indexed access
// crossed a page, for coverage checks.
package pacs_ref_pkg;

  // implemented opcodes, by group
  localparam int NUM_LEGAL = 117;
  localparam byte unsigned LEGAL [NUM_LEGAL] = '{
    8'h01, 8'h05, 8'h09, 8'h0D, 8'h11, 8'h15, 8'h19, 8'h1D,  // ORA
    8'h21, 8'h25, 8'h29, 8'h2D, 8'h31, 8'h35, 8'h39, 8'h3D,  // AND
    8'h41, 8'h45, 8'h49, 8'h4D, 8'h51, 8'h55, 8'h59, 8'h5D,  // EOR
    8'h61, 8'h65, 8'h69, 8'h6D, 8'h71, 8'h75, 8'h79, 8'h7D,  // ADC
    8'h81, 8'h85, 8'h8D, 8'h91, 8'h95, 8'h99, 8'h9D,         // STA
    8'hA1, 8'hA5, 8'hA9, 8'hAD, 8'hB1, 8'hB5, 8'hB9, 8'hBD,  // LDA
    8'hC1, 8'hC5, 8'hC9, 8'hCD, 8'hD1, 8'hD5, 8'hD9, 8'hDD,  // CMP
    8'hE1, 8'hE5, 8'hE9, 8'hED, 8'hF1, 8'hF5, 8'hF9, 8'hFD,  // SBC
    8'h06, 8'h0A, 8'h0E, 8'h16, 8'h1E,                       // ASL
    8'h26, 8'h2A, 8'h2E, 8'h36, 8'h3E,                       // ROL
    8'h46, 8'h4A, 8'h4E, 8'h56, 8'h5E,                       // LSR
    8'h66, 8'h6A, 8'h6E, 8'h76, 8'h7E,                       // ROR
    8'h86, 8'h8E, 8'h96,                                     // STX
    8'hA2, 8'hA6, 8'hAE, 8'hB6, 8'hBE,                       // LDX
    8'hC6, 8'hCE, 8'hD6, 8'hDE,                              // DEC
    8'hE6, 8'hEE, 8'hF6, 8'hFE,                              // INC
    8'h24, 8'h2C, 8'h4C, 8'h6C,                              // BIT JMP
    8'h84, 8'h8C, 8'h94,                                     // STY
    8'hA0, 8'hA4, 8'hAC, 8'hB4, 8'hBC,                       // LDY
    8'hC0, 8'hC4, 8'hCC, 8'hE0, 8'hE4, 8'hEC                 // CPY CPX
  };

  typedef enum int {M_IMP, M_ACC, M_IMM, M_ZP, M_ZPX, M_ZPY, M_ABS, M_ABSX,
                    M_ABSY, M_INDX, M_INDY, M_JABS, M_JIND} mode_t;

  function automatic bit is_legal(byte unsigned op);
    foreach (LEGAL[i]) if (LEGAL[i] == op) return 1'b1;
    return 1'b0;
  endfunction

  function automatic mode_t mode_of(byte unsigned op);
    if (!is_legal(op)) return M_IMP;
    if (op == 8'h4C) return M_JABS;
    if (op == 8'h6C) return M_JIND;
    if (op == 8'h96 || op == 8'hB6) return M_ZPY;
    if (op == 8'hBE) return M_ABSY;
    if ((op & 8'h03) == 8'h01) begin
      case (op & 8'h1F)
        8'h01: return M_INDX;
        8'h05: return M_ZP;
        8'h09: return M_IMM;
        8'h0D: return M_ABS;
        8'h11: return M_INDY;
        8'h15: return M_ZPX;
        8'h19: return M_ABSY;
        default: return M_ABSX;
      endcase
    end
    case (op & 8'h1F)
      8'h00, 8'h02: return M_IMM;
      8'h04, 8'h06: return M_ZP;
      8'h0A: return M_ACC;
      8'h0C, 8'h0E: return M_ABS;
      8'h14, 8'h16: return M_ZPX;
      default: return M_ABSX; // 1C, 1E
    endcase
  endfunction

  class Ref6502;
    byte unsigned mem [65536];
    byte unsigned a, x, y, p;
    int unsigned  pc;
    int unsigned  op_count [256];
    int unsigned  page_cross;
    int unsigned  rmw_count;
    int unsigned  writes;

    function new();
      reset();
      foreach (op_count[i]) op_count[i] = 0;
      page_cross = 0;
      rmw_count  = 0;
      writes     = 0;
    endfunction

    function void reset();
      a = 0; x = 0; y = 0; p = 8'h20; pc = 0;
    endfunction

    function byte unsigned rd(int unsigned ad);
      return mem[ad & 16'hFFFF];
    endfunction

    function void wr(int unsigned ad, byte unsigned v);
      mem[ad & 16'hFFFF] = v;
      writes++;
    endfunction

    function byte unsigned fetch();
      byte unsigned b = mem[pc];
      pc = (pc + 1) & 16'hFFFF;
      return b;
    endfunction

    function void set_nz(byte unsigned v);
      p[7] = v[7];
      p[1] = (v == 0);
    endfunction

    // binary add with carry, the core of ADC, SBC and the compares
    function byte unsigned add(byte unsigned l, byte unsigned r, bit cin,
                               output bit cout, output bit ovf);
      int unsigned s = int'(l) + int'(r) + int'(cin);
      byte unsigned res = s[7:0];
      cout = (s > 255);
      ovf  = ((~(l ^ r)) & (l ^ res) & 8'h80) != 0;
      return res;
    endfunction

    // execute one instruction, return its cycle count
    function int step();
      byte unsigned op, lo, hi, zp, m, r;
      int unsigned  ea, base;
      mode_t        md;
      int           cyc;
      bit           xpg, c, v, is_store, is_rmw;
      op = fetch();
      op_count[op]++;
      md = mode_of(op);
      is_store = op inside {8'h81, 8'h85, 8'h8D, 8'h91, 8'h95, 8'h99, 8'h9D,
                            8'h86, 8'h8E, 8'h96, 8'h84, 8'h8C, 8'h94};
      is_rmw = ((op & 8'h03) == 8'h02) && (md != M_ACC) &&
               ((op >> 5) inside {0, 1, 2, 3, 6, 7}) && is_legal(op);
      xpg = 0;
      ea = 0;
      cyc = 2;
      case (md)
        M_IMP, M_ACC: cyc = 2;
        M_IMM: begin ea = pc; pc = (pc + 1) & 16'hFFFF; cyc = 2; end
        M_ZP:  begin ea = fetch(); cyc = 3; end
        M_ZPX: begin ea = (fetch() + x) & 8'hFF; cyc = 4; end
        M_ZPY: begin ea = (fetch() + y) & 8'hFF; cyc = 4; end
        M_ABS: begin lo = fetch(); hi = fetch(); ea = {hi, lo}; cyc = 4; end
        M_ABSX, M_ABSY: begin
          lo = fetch(); hi = fetch(); base = {hi, lo};
          ea = (base + ((md == M_ABSX) ? x : y)) & 16'hFFFF;
          xpg = (ea[15:8] != base[15:8]);
          cyc = 4 + int'(xpg);
        end
        M_INDX: begin
          zp = (fetch() + x) & 8'hFF;
          ea = {rd((zp + 1) & 8'hFF), rd(zp)};
          cyc = 6;
        end
        M_INDY: begin
          zp = fetch();
          base = {rd((zp + 1) & 8'hFF), rd(zp)};
          ea = (base + y) & 16'hFFFF;
          xpg = (ea[15:8] != base[15:8]);
          cyc = 5 + int'(xpg);
        end
        M_JABS: begin lo = fetch(); hi = fetch(); pc = {hi, lo}; cyc = 3; end
        M_JIND: begin
          lo = fetch(); hi = fetch();
          // the target's high byte comes from the same page
          pc = {rd({hi, 8'((lo + 1) & 8'hFF)}), rd({hi, lo})};
          cyc = 5;
        end
        default: ;
      endcase
      if (is_store) begin
        if (md inside {M_ABSX, M_ABSY}) cyc = 5;
        if (md == M_INDY) cyc = 6;
      end
      if (is_rmw) begin
        rmw_count++;
        case (md)
          M_ZP: cyc = 5;
          M_ZPX, M_ABS: cyc = 6;
          default: cyc = 7;
        endcase
      end
      if (xpg && !is_store && !is_rmw) page_cross++;

      if (md inside {M_IMP, M_JABS, M_JIND}) return cyc;
      m = (md == M_ACC) ? a : rd(ea);
      if ((op & 8'h03) == 8'h01) begin
        case (op >> 5)
          0: begin a = a | m; set_nz(a); end
          1: begin a = a & m; set_nz(a); end
          2: begin a = a ^ m; set_nz(a); end
          3: begin a = add(a, m, p[0], c, v); p[0] = c; p[6] = v; set_nz(a); end
          4: wr(ea, a);
          5: begin a = m; set_nz(a); end
          6: begin r = add(a, ~m, 1'b1, c, v); p[0] = c; set_nz(r); end
          default: begin a = add(a, ~m, p[0], c, v); p[0] = c; p[6] = v; set_nz(a); end
        endcase
      end else if ((op & 8'h03) == 8'h02) begin
        case (op >> 5)
          0, 1: begin r = {m[6:0], (op >> 5) == 1 ? p[0] : 1'b0}; p[0] = m[7]; end
          2, 3: begin r = {(op >> 5) == 3 ? p[0] : 1'b0, m[7:1]}; p[0] = m[0]; end
          4: wr(ea, x);
          5: begin x = m; set_nz(x); end
          6: r = m - 1;
          default: r = m + 1;
        endcase
        if ((op >> 5) inside {0, 1, 2, 3, 6, 7}) begin
          set_nz(r);
          if (md == M_ACC) a = r;
          else wr(ea, r);
        end
      end else begin
        case (op >> 5)
          1: begin p[7] = m[7]; p[6] = m[6]; p[1] = ((a & m) == 0); end
          4: wr(ea, y);
          5: begin y = m; set_nz(y); end
          6: begin r = add(y, ~m, 1'b1, c, v); p[0] = c; set_nz(r); end
          default: begin r = add(x, ~m, 1'b1, c, v); p[0] = c; set_nz(r); end
        endcase
      end
      return cyc;
    endfunction
  endclass

endpackage
