// pic_tb_pkg: test support for the microcontroller.
//
// 1. Instruction encoders (a tiny assembler): one function per mnemonic of
//    the instruction set, returning the 14-bit word.
// 2. pic_isa_model: an instruction-set level model of the microcontroller.
//    It holds only the programmer-visible state (PC, W, STATUS, FSR, PCLATH,
//    ports, TRIS, the 8-level stack and the general purpose registers) and
//    executes one whole instruction per call of step(), returning the
//    number of instruction cycles it takes.  Testbenches compare the RTL
//    with it at the start of every instruction cycle.  It is written from
//    the instruction descriptions, independently of the RTL's structure.
package pic_tb_pkg;

  // ----------------------------------------------------------- assembler
  function automatic logic [13:0] bytef(logic [3:0] op, logic [6:0] f, logic d);
    return {2'b00, op, d, f};
  endfunction
  function automatic logic [13:0] ADDWF(logic [6:0] f, logic d); return bytef(4'b0111, f, d); endfunction
  function automatic logic [13:0] ANDWF(logic [6:0] f, logic d); return bytef(4'b0101, f, d); endfunction
  function automatic logic [13:0] CLRF (logic [6:0] f);          return bytef(4'b0001, f, 1'b1); endfunction
  function automatic logic [13:0] CLRW ();                       return bytef(4'b0001, 7'd0, 1'b0); endfunction
  function automatic logic [13:0] COMF (logic [6:0] f, logic d); return bytef(4'b1001, f, d); endfunction
  function automatic logic [13:0] DECF (logic [6:0] f, logic d); return bytef(4'b0011, f, d); endfunction
  function automatic logic [13:0] DECFSZ(logic [6:0] f, logic d); return bytef(4'b1011, f, d); endfunction
  function automatic logic [13:0] INCF (logic [6:0] f, logic d); return bytef(4'b1010, f, d); endfunction
  function automatic logic [13:0] INCFSZ(logic [6:0] f, logic d); return bytef(4'b1111, f, d); endfunction
  function automatic logic [13:0] IORWF(logic [6:0] f, logic d); return bytef(4'b0100, f, d); endfunction
  function automatic logic [13:0] MOVF (logic [6:0] f, logic d); return bytef(4'b1000, f, d); endfunction
  function automatic logic [13:0] MOVWF(logic [6:0] f);          return bytef(4'b0000, f, 1'b1); endfunction
  function automatic logic [13:0] NOP  ();                       return 14'h0000; endfunction
  function automatic logic [13:0] RLF  (logic [6:0] f, logic d); return bytef(4'b1101, f, d); endfunction
  function automatic logic [13:0] RRF  (logic [6:0] f, logic d); return bytef(4'b1100, f, d); endfunction
  function automatic logic [13:0] SUBWF(logic [6:0] f, logic d); return bytef(4'b0010, f, d); endfunction
  function automatic logic [13:0] SWAPF(logic [6:0] f, logic d); return bytef(4'b1110, f, d); endfunction
  function automatic logic [13:0] XORWF(logic [6:0] f, logic d); return bytef(4'b0110, f, d); endfunction
  function automatic logic [13:0] BCF  (logic [6:0] f, logic [2:0] b); return {4'b0100, b, f}; endfunction
  function automatic logic [13:0] BSF  (logic [6:0] f, logic [2:0] b); return {4'b0101, b, f}; endfunction
  function automatic logic [13:0] BTFSC(logic [6:0] f, logic [2:0] b); return {4'b0110, b, f}; endfunction
  function automatic logic [13:0] BTFSS(logic [6:0] f, logic [2:0] b); return {4'b0111, b, f}; endfunction
  function automatic logic [13:0] ADDLW(logic [7:0] k) ; return {6'b111110, k}; endfunction
  function automatic logic [13:0] ANDLW(logic [7:0] k) ; return {6'b111001, k}; endfunction
  function automatic logic [13:0] CALL (logic [10:0] k); return {3'b100, k}; endfunction
  function automatic logic [13:0] CLRWDT();              return 14'h0064; endfunction
  function automatic logic [13:0] GOTO (logic [10:0] k); return {3'b101, k}; endfunction
  function automatic logic [13:0] IORLW(logic [7:0] k) ; return {6'b111000, k}; endfunction
  function automatic logic [13:0] MOVLW(logic [7:0] k) ; return {6'b110000, k}; endfunction
  function automatic logic [13:0] RETFIE();              return 14'h0069; endfunction
  function automatic logic [13:0] RETLW(logic [7:0] k) ; return {6'b110100, k}; endfunction
  function automatic logic [13:0] RETURN();              return 14'h0008; endfunction
  function automatic logic [13:0] SLEEP();               return 14'h0063; endfunction
  function automatic logic [13:0] SUBLW(logic [7:0] k) ; return {6'b111100, k}; endfunction
  function automatic logic [13:0] XORLW(logic [7:0] k) ; return {6'b111010, k}; endfunction

  // ------------------------------------------------------ ISA-level model
  class pic_isa_model;
    int unsigned prog_words;
    int unsigned gpr_base;
    int unsigned gpr_count;
    logic [13:0] prog [];
    logic [7:0]  gpr  [];
    logic [12:0] pc;
    logic [7:0]  w, status, fsr, porta_lat, portb_lat, trisa, trisb;
    logic [4:0]  pclath;
    logic [12:0] stack [8];
    int unsigned sp;
    logic [7:0]  porta_in, portb_in;
    bit          asleep;

    function new(int unsigned words, int unsigned base, int unsigned count);
      prog_words = words;
      gpr_base   = base;
      gpr_count  = count;
      prog = new[words];
      gpr  = new[count];
      reset();
    endfunction

    function void reset();
      pc = 0; w = 0; status = 8'h18; fsr = 0; pclath = 0;
      porta_lat = 0; portb_lat = 0; trisa = 8'hFF; trisb = 8'hFF;
      sp = 0; asleep = 0;
    endfunction

    function bit is_gpr(logic [7:0] a);
      return (32'(a[6:0]) >= gpr_base) && (32'(a[6:0]) < gpr_base + gpr_count);
    endfunction

    function logic [7:0] rd(logic [7:0] a);
      if (is_gpr(a)) return gpr[a[6:0] - gpr_base];
      case (a[6:0])
        7'h02: return pc[7:0];
        7'h03: return status;
        7'h04: return fsr;
        7'h05: return a[7] ? trisa : ((trisa & porta_in) | (~trisa & porta_lat));
        7'h06: return a[7] ? trisb : ((trisb & portb_in) | (~trisb & portb_lat));
        7'h0A: return {3'b000, pclath};
        default: return 8'h00;
      endcase
    endfunction

    // returns 1 when the write changed the program counter
    function bit wr(logic [7:0] a, logic [7:0] v);
      if (is_gpr(a)) begin
        gpr[a[6:0] - gpr_base] = v;
        return 0;
      end
      case (a[6:0])
        7'h02: begin pc = {pclath, v}; return 1; end
        7'h03: status = {v[7:5], status[4:3], v[2:0]};
        7'h04: fsr = v;
        7'h05: if (a[7]) trisa = v; else porta_lat = v;
        7'h06: if (a[7]) trisb = v; else portb_lat = v;
        7'h0A: pclath = v[4:0];
        default: ;
      endcase
      return 0;
    endfunction

    function void push(logic [12:0] v);
      stack[sp] = v;
      sp = (sp + 1) % 8;
    endfunction
    function logic [12:0] pop();
      sp = (sp + 7) % 8;
      return stack[sp];
    endfunction

    // Execute the instruction at pc; returns the number of instruction cycles.
    function int step();
      logic [13:0] ir;
      logic [6:0]  f;
      logic        d;
      logic [2:0]  b;
      logic [7:0]  k, a, v, r;
      logic [8:0]  s9;
      logic [4:0]  s5;
      logic [7:0]  ea;
      int          cyc;
      bit          jumped;
      if (asleep) return 1;
      ir = prog[pc % prog_words];
      pc = pc + 1;
      f = ir[6:0]; d = ir[7]; b = ir[9:7]; k = ir[7:0];
      ea = (f == 0) ? fsr : {status[5], f};
      cyc = 1;
      jumped = 0;
      casez (ir)
        14'b00_0111_????_????: begin   // ADDWF
          a = rd(ea); s9 = a + w; s5 = a[3:0] + w[3:0]; r = s9[7:0];
          jumped = write_dest(d, ea, r);
          status[0] = s9[8]; status[1] = s5[4]; status[2] = (r == 0);
        end
        14'b00_0010_????_????: begin   // SUBWF
          a = rd(ea); s9 = {1'b0, a} - {1'b0, w}; s5 = {1'b0, a[3:0]} - {1'b0, w[3:0]};
          r = s9[7:0];
          jumped = write_dest(d, ea, r);
          status[0] = ~s9[8]; status[1] = ~s5[4]; status[2] = (r == 0);
        end
        14'b00_0101_????_????: begin r = rd(ea) & w; jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_0100_????_????: begin r = rd(ea) | w; jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_0110_????_????: begin r = rd(ea) ^ w; jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_1001_????_????: begin r = ~rd(ea);    jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_0011_????_????: begin r = rd(ea) - 1; jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_1010_????_????: begin r = rd(ea) + 1; jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_1000_????_????: begin r = rd(ea);     jumped = write_dest(d, ea, r); status[2] = (r == 0); end
        14'b00_0001_????_????: begin r = 0;          jumped = write_dest(d, ea, r); status[2] = 1'b1; end
        14'b00_1011_????_????: begin               // DECFSZ
          r = rd(ea) - 1; jumped = write_dest(d, ea, r);
          if (r == 0 && !jumped) begin pc = pc + 1; jumped = 1; end
        end
        14'b00_1111_????_????: begin               // INCFSZ
          r = rd(ea) + 1; jumped = write_dest(d, ea, r);
          if (r == 0 && !jumped) begin pc = pc + 1; jumped = 1; end
        end
        14'b00_1101_????_????: begin               // RLF
          a = rd(ea); r = {a[6:0], status[0]}; jumped = write_dest(d, ea, r); status[0] = a[7];
        end
        14'b00_1100_????_????: begin               // RRF
          a = rd(ea); r = {status[0], a[7:1]}; jumped = write_dest(d, ea, r); status[0] = a[0];
        end
        14'b00_1110_????_????: begin a = rd(ea); r = {a[3:0], a[7:4]}; jumped = write_dest(d, ea, r); end
        14'b00_0000_1???_????: jumped = wr(ea, w);    // MOVWF
        14'b00_0000_0??0_0000: ;                      // NOP
        14'b00_0000_0000_1000: begin pc = pop(); jumped = 1; end                 // RETURN
        14'b00_0000_0110_1001,
        14'b00_0000_0000_1001: begin pc = pop(); jumped = 1; end                 // RETFIE
        14'b00_0000_0110_0011: begin asleep = 1; status[3] = 0; status[4] = 1; end // SLEEP
        14'b00_0000_0110_0100: ;                      // CLRWDT
        14'b01_00??_????_????: begin v = rd(ea); v[b] = 1'b0; jumped = wr(ea, v); end
        14'b01_01??_????_????: begin v = rd(ea); v[b] = 1'b1; jumped = wr(ea, v); end
        14'b01_10??_????_????: begin v = rd(ea); if (v[b] == 1'b0) begin pc = pc + 1; jumped = 1; end end
        14'b01_11??_????_????: begin v = rd(ea); if (v[b] == 1'b1) begin pc = pc + 1; jumped = 1; end end
        14'b10_0???_????_????: begin push(pc); pc = {pclath[4:3], ir[10:0]}; jumped = 1; end // CALL
        14'b10_1???_????_????: begin pc = {pclath[4:3], ir[10:0]}; jumped = 1; end          // GOTO
        14'b11_00??_????_????: w = k;                                                     // MOVLW
        14'b11_01??_????_????: begin w = k; pc = pop(); jumped = 1; end                   // RETLW
        14'b11_1000_????_????: begin w = k | w; status[2] = (w == 0); end
        14'b11_1001_????_????: begin w = k & w; status[2] = (w == 0); end
        14'b11_1010_????_????: begin w = k ^ w; status[2] = (w == 0); end
        14'b11_110?_????_????: begin                                                     // SUBLW
          s9 = {1'b0, k} - {1'b0, w}; s5 = {1'b0, k[3:0]} - {1'b0, w[3:0]};
          w = s9[7:0]; status[0] = ~s9[8]; status[1] = ~s5[4]; status[2] = (w == 0);
        end
        14'b11_111?_????_????: begin                                                     // ADDLW
          s9 = k + w; s5 = k[3:0] + w[3:0];
          w = s9[7:0]; status[0] = s9[8]; status[1] = s5[4]; status[2] = (w == 0);
        end
        default: ;                                   // unused word: no operation
      endcase
      if (jumped) cyc = 2;
      return cyc;
    endfunction

    function bit write_dest(logic d, logic [7:0] ea, logic [7:0] r);
      if (d) return wr(ea, r);
      w = r;
      return 0;
    endfunction
  endclass

endpackage
