// hdiv_pkg: types shared by the hybrid decimal divider.
//
// Digits are 4-bit codes. Inside the divider every number is held in
// excess-3 code (digit value + 3); only the external ports carry plain BCD.
// Negative partial remainders are ten's complement numbers written in
// excess-3, so a number is negative exactly when bit 3 of its most
// significant excess-3 digit is set (digit value 5..9).
//
// dp_ctrl_t is the command word the controller sends to the datapath each
// cycle, dp_status_t what the datapath reports back. Both are this design's
// own partitioning of the flow of the hybrid algorithm.
package hdiv_pkg;

  typedef logic [3:0] bcd_t;
  typedef logic [3:0] ex3_t;

  localparam ex3_t EX3_ZERO = 4'd3;
  localparam ex3_t EX3_ONE  = 4'd4;

  // Datapath command for one clock cycle.
  typedef struct packed {
    logic load;      // load dividend into Cur_R, divisor into D, clear quotient
    logic arith;     // Cur_R <= Cur_R -/+ D and quotient +/- 1
    logic sub;       // with arith: 1 subtract D / add 1, 0 add D / subtract 1
    logic save_pre;  // Pre_R <= Cur_R (value before this cycle's operation)
    logic shift;     // shift Cur_R (after arith, if any) and quotient one digit left
  } dp_ctrl_t;

  // Datapath status, all from registered values.
  typedef struct packed {
    logic cur_neg;     // Cur_R < 0
    logic pre_neg;     // Pre_R < 0
    logic pre_ge_cur;  // |Pre_R| >= |Cur_R|
    logic q_ge10;      // quotient register >= 10
  } dp_status_t;

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // waiting for start
    ST_RUN  = 2'd1,  // digit loop of the flow chart
    ST_FIX  = 2'd2   // final sign correction
  } state_t;

endpackage
