// motion_fsm_table_pkg: the control state machine of the motion-detection
// application, as table words for host_fsm, plus a reference next-state
// and output function for checking.
//
// States: IDLE, I2D (switch to difference), DIFF1, DIFF (wait for Done),
// D2L (switch to low-pass), LPF1, LPF, L2B (switch to binary), BIN1, BIN.
// Outputs: bits 1:0 Ctx, bit 2 CtxSw, bit 3 Calc. Input bit 0 is Done.
// Table address = {state, inputs} (4 + 2 bits); word = {next, outputs}
// where the outputs are those of the next state (host_fsm registers them).
package motion_fsm_table_pkg;
  typedef enum logic [3:0] {IDLE=0, I2D=1, DIFF1=2, DIFF=3, D2L=4, LPF1=5, LPF=6,
                            L2B=7, BIN1=8, BIN=9} mst_e;

  function automatic logic [3:0] next_state(input logic [3:0] s, input logic done);
    case (s)
      IDLE:  return I2D;
      I2D:   return DIFF1;
      DIFF1: return DIFF;
      DIFF:  return done ? D2L : DIFF;
      D2L:   return LPF1;
      LPF1:  return LPF;
      LPF:   return done ? L2B : LPF;
      L2B:   return BIN1;
      BIN1:  return BIN;
      BIN:   return done ? IDLE : BIN;
      default: return IDLE;
    endcase
  endfunction

  // {Calc, CtxSw, Ctx[1:0]} of a state
  function automatic logic [7:0] moore_out(input logic [3:0] s);
    case (s)
      I2D:               return 8'b0000_0100;
      D2L:               return 8'b0000_0101;
      L2B:               return 8'b0000_0110;
      DIFF1, DIFF, LPF1, LPF, BIN1, BIN: return 8'b0000_1000;
      default:           return 8'b0000_0000;
    endcase
  endfunction

  function automatic logic [15:0] table_word(input int addr);
    logic [3:0] s, n;
    s = 4'(addr >> 2);
    n = next_state(s, addr[0]);
    return {4'd0, n, moore_out(n)};
  endfunction
endpackage
