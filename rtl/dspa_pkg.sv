// dspa_pkg: types and constants shared by every unit of the multi-unit
// architecture.
//
// A unit runs "coarse grain instructions". Each one names the operation the
// unit's computation cell performs and, for each of the unit's two network
// inputs and its one network output, where the data crosspoint lies in the
// communication network and whether the transfer is blocking (check that data
// or space is available before each word) or non blocking (the static
// schedule guarantees it, nothing is checked). That content follows the
// architecture's description; the field widths, the op-code values, the
// length and base-address fields, the reserved bus number BUS_ASYNC and the
// 32-bit data word (a complex sample,
// 16-bit real part in the upper half, 16-bit imaginary part in the lower
// half) are this design's own choices.
package dspa_pkg;

  localparam int unsigned DATA_W = 32;   // one network word
  localparam int unsigned CPLX_W = 16;   // each part of a complex word
  localparam int unsigned SEL_W  = 4;    // bus / unit / port index fields
  localparam int unsigned LEN_W  = 12;   // words moved by one instruction
  localparam int unsigned ADDR_W = 12;   // base address for data memories
  localparam int unsigned N_IN   = 2;    // network inputs of every unit

  // Bus number that, in a network with both buses and FIFO crosspoints,
  // sends a port's transfer through its FIFO crosspoint (asynchronous)
  // instead of over a bus (synchronous).
  localparam logic [SEL_W-1:0] BUS_ASYNC = '1;

  typedef logic [DATA_W-1:0] word_t;

  // Operation codes; each cell reacts to the ones that concern it.
  typedef enum logic [2:0] {
    OP_FFT   = 3'd0,  // forward transform (FFT cell)
    OP_IFFT  = 3'd1,  // inverse transform (FFT cell)
    OP_ADD   = 3'd2,  // vector addition (adder cell)
    OP_STORE = 3'd3,  // network -> memory (data memory cell)
    OP_LOAD  = 3'd4,  // memory -> network (data memory cell)
    OP_INPUT = 3'd5   // input queue -> network (input cell)
  } opcode_e;

  // Transfer protocol of one port for one instruction.
  typedef enum logic {
    PROT_NONBLOCK = 1'b0,
    PROT_BLOCK    = 1'b1
  } prot_e;

  // Location and protocol of one input crosspoint.
  typedef struct packed {
    logic             en;    // port used by this instruction
    prot_e            prot;
    logic [SEL_W-1:0] bus;   // bus to listen on (bus network)
    logic [SEL_W-1:0] src;   // sending unit (both networks)
  } in_port_t;

  // Location and protocol of the output crosspoint.
  typedef struct packed {
    logic             en;
    prot_e            prot;
    logic [SEL_W-1:0] bus;   // bus to drive (bus network)
    logic [SEL_W-1:0] dst;   // receiving port, unit*N_IN+input (FIFO crossbar)
  } out_port_t;

  typedef struct packed {
    opcode_e           op;
    logic [LEN_W-1:0]  len;
    logic [ADDR_W-1:0] base;
    in_port_t [N_IN-1:0] in;
    out_port_t         out;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Kind of computation cell a generic unit encapsulates.
  typedef enum logic [1:0] {
    CELL_FFT = 2'd0,
    CELL_ADD = 2'd1,
    CELL_MEM = 2'd2,
    CELL_IN  = 2'd3
  } cell_e;

endpackage
