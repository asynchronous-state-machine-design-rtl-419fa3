// Shared names for the asynchronous Digilock.
//
// The lock has four state variables, sreg[3:0]. Ten of the sixteen codes are
// states of the reduced flow table. The codes are chosen so that most
// input changes move only one state variable. The other six codes are never
// stable: the logic sends them to ERR. The code values and state names follow
// the lock's state assignment. The enum type and the STATE0..STATE9 aliases
// (the names on the state diagram) are a convenience of this package.
package digilock_pkg;

  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned STATE_W = 4;

  typedef enum logic [STATE_W-1:0] {
    INIT = 4'b0000,  // waiting for the first B0 press (diagram STATE0)
    ERR  = 4'b1000,  // wrong button; back to INIT when both are released (STATE1)
    B0P1 = 4'b0001,  // B0 pressed, first digit (STATE2)
    B0R1 = 4'b0011,  // B0 released (STATE3)
    B1P1 = 4'b0010,  // B1 pressed, second digit (STATE4)
    B1R1 = 4'b0110,  // B1 released (STATE5)
    B1P2 = 4'b0111,  // B1 pressed, third digit (STATE6)
    B1R2 = 4'b0101,  // B1 released (STATE7)
    B0P2 = 4'b0100,  // B0 pressed, fourth digit (STATE8)
    ULK  = 4'b1100   // bolt open until RESET (STATE9)
  } state_e;

  // Push-button inputs, one flow-table column each.
  typedef struct packed {
    logic b0;
    logic b1;
  } buttons_t;

  // True for the ten codes of the flow table, false for the six unused ones.
  function automatic logic is_assigned(logic [STATE_W-1:0] code);
    case (code)
      INIT, ERR, B0P1, B0R1, B1P1, B1R1, B1P2, B1R2, B0P2, ULK: return 1'b1;
      default:                                                return 1'b0;
    endcase
  endfunction

endpackage
