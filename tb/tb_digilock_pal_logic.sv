// Self-checking testbench for digilock_pal_logic.
//
// Applies every present state (all 16 codes), every button combination and
// both levels of reset, and compares next_sreg and unlock with a reference
// written from the lock's flow table, row by row (not from the equations):
//   - stable entries keep the state, the next press or release of the
//     sequence B0,B1,B1,B0 moves one step on, any other press goes to ERR;
//   - ERR and the six unused codes go to INIT on 00, else to ERR;
//     the unused codes go through ERR (1000) first, as the compiled logic
//     sends every unused code to ERR;
//   - ULK stays ULK; reset gives INIT from anywhere.
// unlock must be 1 exactly in ULK. The block is combinational: each vector is
// checked 1 ns after it is applied.
module tb_digilock_pal_logic;
  import digilock_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic [STATE_W-1:0] sreg, next_sreg;
  logic               b0, b1, reset, unlock;
  int checks = 0, failures = 0;

  digilock_pal_logic dut (.*);

  // Reference flow table. Columns: 00, 10 (B0 only), 11, 01 (B1 only).
  function automatic logic [3:0] ref_next(logic [3:0] s, logic i0, logic i1, logic r);
    logic [1:0] col;
    if (r) return INIT;
    col = {i0, i1};
    case (s)
      INIT: return (col == 2'b00) ? INIT : (col == 2'b10) ? B0P1 : ERR;
      B0P1: return (col == 2'b00) ? B0R1 : (col == 2'b10) ? B0P1 : ERR;
      B0R1: return (col == 2'b00) ? B0R1 : (col == 2'b01) ? B1P1 : ERR;
      B1P1: return (col == 2'b00) ? B1R1 : (col == 2'b01) ? B1P1 : ERR;
      B1R1: return (col == 2'b00) ? B1R1 : (col == 2'b01) ? B1P2 : ERR;
      B1P2: return (col == 2'b00) ? B1R2 : (col == 2'b01) ? B1P2 : ERR;
      B1R2: return (col == 2'b00) ? B1R2 : (col == 2'b10) ? B0P2 : ERR;
      B0P2: return (col == 2'b00) ? ULK  : (col == 2'b10) ? B0P2 : ERR;
      ULK:  return ULK;
      ERR:  return (col == 2'b00) ? INIT : ERR;
      default: return ERR;  // unused codes
    endcase
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 16; s++)
        for (int c = 0; c < 4; c++) begin
          sreg  = 4'(s);
          {b0, b1} = 2'(c);
          reset = 1'(r);
          #1000;
          checks++;
          if (next_sreg !== ref_next(sreg, b0, b1, reset)) begin
            failures++;
            $display("FAIL next: sreg=%b b0=%b b1=%b reset=%b got %b want %b",
                     sreg, b0, b1, reset, next_sreg, ref_next(sreg, b0, b1, reset));
          end
          checks++;
          if (unlock !== (sreg == ULK)) begin
            failures++;
            $display("FAIL unlock: sreg=%b got %b", sreg, unlock);
          end
        end
    // Stable states: exactly the ten assigned codes have a stable column.
    for (int s = 0; s < 16; s++) begin
      logic has_stable;
      has_stable = 1'b0;
      sreg  = 4'(s);
      reset = 1'b0;
      for (int c = 0; c < 4; c++) begin
        {b0, b1} = 2'(c);
        #1000;
        if (next_sreg == sreg) has_stable = 1'b1;
      end
      checks++;
      if (has_stable !== is_assigned(4'(s))) begin
        failures++;
        $display("FAIL stability of code %b", 4'(s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
