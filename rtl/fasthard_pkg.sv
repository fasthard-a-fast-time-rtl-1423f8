// fasthard_pkg: sizes, register map, service-call codes and task states
// shared by every block of the FASTHARD real-time unit.
//
// The numbers of tasks (256), priorities (8) and external interrupts (8),
// the 16-bit data registers, the register select map (address bits 2..0
// with the R/W-N line) and the bit positions of the service calls in the
// CALL_SVC register follow the original FASTHARD description. The task
// state encoding, the return-word encoding, the tick length and the number
// of rendezvous entries are this design's own choices.
package fasthard_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned NTASKS   = 256;  // tasks handled
  localparam int unsigned NPRIO    = 8;    // priority levels, 0 = highest
  localparam int unsigned NIRQ     = 8;    // external interrupt lines
  localparam int unsigned DW       = 16;   // CPU data register width
  localparam int unsigned NPARAM   = 4;    // parameter words buffered per call
  localparam int unsigned TW       = 16;   // tick counter width

  // ---- register select: ADR[2:0] ------------------------------------------
  localparam logic [2:0] A_HS_TSW         = 3'b000;  // write
  localparam logic [2:0] A_NEXT_TASK_ID   = 3'b001;  // read
  localparam logic [2:0] A_BLOCK_TSW      = 3'b010;  // read and write
  localparam logic [2:0] A_CALL_SVC       = 3'b011;  // write
  localparam logic [2:0] A_HS_SVC         = 3'b100;  // read
  localparam logic [2:0] A_RETURN_DATA    = 3'b101;  // read
  localparam logic [2:0] A_PARAMETER_DATA = 3'b110;  // write

  // ---- CALL_SVC bit positions --------------------------------------------
  localparam int unsigned B_RELATIVE_DELAY     = 0;
  localparam int unsigned B_TERMINATE          = 1;
  localparam int unsigned B_ACTIVATE           = 2;
  localparam int unsigned B_INIT_PERIOD_TIME   = 3;
  localparam int unsigned B_WAIT_NEXT_PERIOD   = 4;
  localparam int unsigned B_OFF_PERIOD_START   = 5;
  localparam int unsigned B_WAIT_IRQ_EXTERNAL  = 6;
  localparam int unsigned B_ACCEPT             = 7;
  localparam int unsigned B_COMPLETE           = 8;
  localparam int unsigned B_CALL               = 9;

  // ---- return word -------------------------------------------------------
  localparam logic [DW-1:0] RET_OK      = 16'h0000;
  localparam logic [DW-1:0] RET_TIMEOUT = 16'h8000;  // bit 15: time out
  localparam logic [DW-1:0] RET_ERROR   = 16'h4000;  // bit 14: call refused

  // ---- task states (Figure 1 of the original state diagram) ---------------
  typedef enum logic [3:0] {
    TS_DORMANT     = 4'd0,   // terminated / never activated
    TS_READY       = 4'd1,   // in a ready queue
    TS_EXECUTING   = 4'd2,   // owns the CPU
    TS_DELAY       = 4'd3,   // RELATIVE_DELAY
    TS_PERIOD_WAIT = 4'd4,   // WAIT_FOR_NEXT_PERIOD
    TS_IRQ_WAIT    = 4'd5,   // WAIT_IRQ_EXTERNAL
    TS_CALL_WAIT   = 4'd6,   // in a call queue, callee not yet accepting
    TS_ACCEPT_WAIT = 4'd7,   // in an accept queue, no caller yet
    TS_RENDEZVOUS  = 4'd8    // call accepted, waiting for COMPLETE
  } task_state_e;

endpackage
