// Command and response coding of the host protocol, kept apart from the
// communication controller so that an instrument's command list can be
// changed in one place. Flow-control bytes: ATN (host wakes the device),
// ATN_RET (device ready for the stream), BUSY and READY (either side
// pausing and resuming). A COMMAND is four bytes: op, address high,
// address low, length in 32-bit words (0 means 256). A RESPONSE is six
// bytes: op with bit 7 set, a status byte (0 = accepted, 1 = unknown op)
// and a 32-bit value, most significant byte first. Payload words travel
// most significant byte first. The byte values, op codes and field layout
// are this design's own; the document defines the transaction types and
// flow-control symbols but leaves their coding to another document.
package io_cmd_pkg;
  localparam logic [7:0] ATN     = 8'hA5;
  localparam logic [7:0] ATN_RET = 8'h5A;
  localparam logic [7:0] BUSY    = 8'hB5;
  localparam logic [7:0] READY   = 8'hC3;

  typedef enum logic [7:0] {
    OP_SET_FLAG  = 8'h10,  // TASK: flag[addr] <= 1
    OP_CLR_FLAG  = 8'h11,  // TASK: flag[addr] <= 0
    OP_RD_LINES  = 8'h12,  // TASK: response value = static lines
    OP_RD_STATUS = 8'h13,  // TASK: response value = internal status
    OP_RD_FLAGS  = 8'h14,  // TASK: response value = flags
    OP_WRITE     = 8'h20,  // WRITE: payload to addr, addr+1, ...
    OP_WRITE_FIX = 8'h21,  // WRITE: payload to addr repeatedly
    OP_READ      = 8'h30,  // READ: payload from addr, addr+1, ...
    OP_READ_FIX  = 8'h31   // READ: payload from addr repeatedly (stacks)
  } op_t;

  typedef enum logic [1:0] {T_TASK, T_WRITE, T_READ, T_BAD} ttype_t;

  function automatic ttype_t ttype(input logic [7:0] op);
    case (op)
      OP_SET_FLAG, OP_CLR_FLAG, OP_RD_LINES, OP_RD_STATUS, OP_RD_FLAGS: return T_TASK;
      OP_WRITE, OP_WRITE_FIX: return T_WRITE;
      OP_READ, OP_READ_FIX:   return T_READ;
      default:                return T_BAD;
    endcase
  endfunction
endpackage
