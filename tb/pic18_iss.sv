// pic18_iss: instruction-level reference model of the implemented PIC18
// subset, used by the testbenches to predict architectural state.
//
// A class holding PC, WREG, STATUS, BSR, PROD, the return stack and the data
// memory. step() executes one instruction from the program array `rom`
// (word addressed) exactly as the PIC18 data sheet defines it, with the
// SFRs WREG (0xFE8), STATUS (0xFD8), BSR (0xFE0), PRODL (0xFF3) and
// PRODH (0xFF4) backed by the model's registers. It counts the events the
// testbench has to see: taken and untaken conditional branches, stack
// pushes and pops, and data-memory reads and writes.
// Own choice: an instruction-level model of the PIC18 subset, used only as
// the reference in the end-to-end test.
package pic18_iss;

  class iss_c;
    int unsigned pc, w, status, bsr, prodl, prodh, sp;
    int unsigned stack [33];
    bit [7:0]    ram [4096];
    bit [15:0]   rom [];
    int unsigned n_taken, n_untaken, n_push, n_pop, n_mem_wr, n_mem_rd, n_sfr, n_instr;

    function new(int unsigned words);
      rom = new[words];
      foreach (rom[i]) rom[i] = 16'h0000;
      foreach (ram[i]) ram[i] = 8'h00;
      pc = 0; w = 0; status = 0; bsr = 0; prodl = 0; prodh = 0; sp = 0;
      n_taken = 0; n_untaken = 0; n_push = 0; n_pop = 0; n_mem_wr = 0; n_mem_rd = 0;
      n_sfr = 0; n_instr = 0;
    endfunction

    function int unsigned faddr(bit a, int unsigned f);
      if (a) return (bsr << 8) | f;
      return (f >= 'h80) ? ('hF00 | f) : f;
    endfunction

    function int unsigned rd(int unsigned ad);
      case (ad)
        'hFE8: begin n_sfr++; return w; end
        'hFD8: begin n_sfr++; return status; end
        'hFE0: begin n_sfr++; return bsr; end
        'hFF3: begin n_sfr++; return prodl; end
        'hFF4: begin n_sfr++; return prodh; end
        default: begin n_mem_rd++; return ram[ad]; end
      endcase
    endfunction

    function void wr(int unsigned ad, int unsigned v);
      v &= 'hFF;
      case (ad)
        'hFE8: begin n_sfr++; w = v; end
        'hFD8: begin n_sfr++; status = v; end
        'hFE0: begin n_sfr++; bsr = v & 'hF; end
        'hFF3: begin n_sfr++; prodl = v; end
        'hFF4: begin n_sfr++; prodh = v; end
        default: begin n_mem_wr++; ram[ad] = v[7:0]; end
      endcase
    endfunction

    function void set_zn(int unsigned r);
      status = (status & ~'h14) | ((r & 'hFF) == 0 ? 'h04 : 0) | ((r & 'h80) != 0 ? 'h10 : 0);
    endfunction

    // arithmetic a + b + c with all five flags
    function int unsigned arith(int unsigned a, int unsigned b, int unsigned c);
      int unsigned s, h;
      bit ov;
      s  = a + b + c;
      h  = (a & 'hF) + (b & 'hF) + c;
      ov = ((a & 'h80) == (b & 'h80)) && ((s & 'h80) != (a & 'h80));
      status = (status & ~'h1F) | (s > 'hFF ? 1 : 0) | (h > 'hF ? 2 : 0) | (ov ? 8 : 0);
      set_zn(s);
      return s & 'hFF;
    endfunction

    function int unsigned sext(int unsigned v, int unsigned bits);
      return (v & (1 << (bits - 1))) ? v | (~0 << bits) : v;
    endfunction

    function void step();
      bit [15:0] iw, w2;
      int unsigned f, ad, r, c, k, pc2;
      bit d, a;
      iw  = rom[(pc >> 1) % rom.size()];
      w2  = rom[((pc >> 1) + 1) % rom.size()];
      f   = iw[7:0]; d = iw[9]; a = iw[8]; k = iw[7:0];
      ad  = faddr(a, f);
      c   = status & 1;
      pc2 = pc + 2;
      n_instr++;
      casez (iw)
        16'h0000: pc = pc2;
        16'h0005: begin sp++; stack[sp] = pc2; n_push++; pc = pc2; end
        16'h0006: begin sp--; n_pop++; pc = pc2; end
        16'b0000_0000_0001_001?: begin pc = stack[sp]; sp--; n_pop++; end
        16'b0000_0001_0000_????: begin bsr = iw[3:0]; pc = pc2; end
        16'b0000_001?_????_????: begin r = rd(ad) * w; prodl = r & 'hFF; prodh = r >> 8; pc = pc2; end
        16'b0000_1000_????_????: begin w = arith(k, (~w) & 'hFF, 1); pc = pc2; end
        16'b0000_1001_????_????: begin w = k | w; set_zn(w); pc = pc2; end
        16'b0000_1010_????_????: begin w = k ^ w; set_zn(w); pc = pc2; end
        16'b0000_1011_????_????: begin w = k & w; set_zn(w); pc = pc2; end
        16'b0000_1101_????_????: begin r = k * w; prodl = r & 'hFF; prodh = r >> 8; pc = pc2; end
        16'b0000_1110_????_????: begin w = k; pc = pc2; end
        16'b0000_1111_????_????: begin w = arith(k, w, 0); pc = pc2; end
        16'b1100_????_????_????: begin r = rd(iw[11:0]); wr(w2[11:0], r); pc = pc + 4; end
        16'b1101_0???_????_????: pc = (pc2 + 2 * sext(iw[10:0], 11)) & 'h1FFFFF;
        16'b1101_1???_????_????: begin sp++; stack[sp] = pc2; n_push++;
                                       pc = (pc2 + 2 * sext(iw[10:0], 11)) & 'h1FFFFF; end
        16'b1110_0???_????_????: begin
          bit t;
          case (iw[10:8])
            0: t = (status & 4) != 0;   1: t = (status & 4) == 0;
            2: t = (status & 1) != 0;   3: t = (status & 1) == 0;
            4: t = (status & 8) != 0;   5: t = (status & 8) == 0;
            6: t = (status & 16) != 0;  default: t = (status & 16) == 0;
          endcase
          if (t) begin n_taken++; pc = (pc2 + 2 * sext(k, 8)) & 'h1FFFFF; end
          else begin n_untaken++; pc = pc2; end
        end
        16'b1110_110?_????_????: begin sp++; stack[sp] = pc + 4; n_push++;
                                       pc = ((w2 & 'hFFF) << 9) | (k << 1); end
        16'b1110_1111_????_????: pc = ((w2 & 'hFFF) << 9) | (k << 1);
        default: begin
          // byte and bit oriented file-register operations
          r = rd(ad);
          case (iw[15:10])
            6'b000001: r = arith(r, 'hFF, 0);                 // DECF
            6'b000100: begin r = r | w; set_zn(r); end        // IORWF
            6'b000101: begin r = r & w; set_zn(r); end        // ANDWF
            6'b000110: begin r = r ^ w; set_zn(r); end        // XORWF
            6'b000111: begin r = (~r) & 'hFF; set_zn(r); end  // COMF
            6'b001000: r = arith(r, w, c);                    // ADDWFC
            6'b001001: r = arith(r, w, 0);                    // ADDWF
            6'b001010: r = arith(r, 1, 0);                    // INCF
            6'b001100: begin status = (status & ~1) | (r & 1); r = (r >> 1) | (c << 7); set_zn(r); end // RRCF
            6'b001101: begin status = (status & ~1) | (r >> 7); r = ((r << 1) | c) & 'hFF; set_zn(r); end // RLCF
            6'b010000: begin r = (r >> 1) | ((r & 1) << 7); set_zn(r); end  // RRNCF
            6'b010001: begin r = ((r << 1) | (r >> 7)) & 'hFF; set_zn(r); end // RLNCF
            6'b010100: begin set_zn(r); end                   // MOVF
            6'b010101: r = arith(w, (~r) & 'hFF, c);          // SUBFWB
            6'b010110: r = arith(r, (~w) & 'hFF, c);          // SUBWFB
            6'b010111: r = arith(r, (~w) & 'hFF, 1);          // SUBWF
            default: ;
          endcase
          casez (iw[15:9])
            7'b0110_100: begin wr(ad, 'hFF); end                                // SETF
            7'b0110_101: begin wr(ad, 0); status |= 4; end                      // CLRF
            7'b0110_110: begin r = arith(0, (~r) & 'hFF, 1); wr(ad, r); end     // NEGF
            7'b0110_111: wr(ad, w);                                             // MOVWF
            7'b0111_???: wr(ad, r ^ (1 << iw[11:9]));                          // BTG
            7'b1000_???: wr(ad, r | (1 << iw[11:9]));                          // BSF
            7'b1001_???: wr(ad, r & ~(1 << iw[11:9]));                         // BCF
            default: if (d) wr(ad, r); else w = r & 'hFF;
          endcase
          pc = pc2;
        end
      endcase
    endfunction
  endclass

endpackage
