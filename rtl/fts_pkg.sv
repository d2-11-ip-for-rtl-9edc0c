// fts_pkg: types and constants shared by the task-scheduling hardware.
//
// Two designs use this package. The RISC-V integration (FTS Delegate per
// core, one FTS Manager, the external Picos dependence manager) uses the
// custom-instruction encodings and the submission/ready/retirement packet
// types. The standalone Fast Task Scheduler IP core uses the command codes
// and the 64-bit command word layout of its command queues.
//
// The instruction names, the three submission classes, the 64-bit task
// identifiers and the command word layout follow the specification. The
// funct7 numbers, the beat kinds sent to Picos and the field widths of the
// packed structs are this design's own choices.
package fts_pkg;

  // ---------------- RISC-V integration ----------------
  localparam int XLEN       = 64;
  localparam int PICOS_ID_W = 32;   // Picos-internal task identifier width
  localparam int MAX_DEPS   = 15;   // dependences per task (0..15 pointer params)
  localparam int MAX_SEQ    = 3 + MAX_DEPS;  // beats in one submission sequence
  localparam int SEQ_LEN_W  = $clog2(MAX_SEQ + 1);

  // funct7 of the ten custom RoCC instructions
  typedef enum logic [6:0] {
    FN_INIT_TASK    = 7'd0,  // rs1 = SW ID, rs2 = number of dependences
    FN_ADD_INFO     = 7'd1,  // rs1 = task metadata word
    FN_IN_DEP       = 7'd2,  // rs1 = pointer
    FN_IN_DEPS      = 7'd3,  // rs1, rs2 = pointers
    FN_OUT_DEP      = 7'd4,
    FN_OUT_DEPS     = 7'd5,
    FN_FETCH_SWID   = 7'd6,  // peek SW ID of the front ready task
    FN_FETCH_PICOS  = 7'd7,  // read Picos ID of the front ready task and pop it
    FN_RETIRE       = 7'd8,  // rs1 = Picos ID of the finished task
    FN_READY_REQ    = 7'd9   // ask for one more ready task
  } funct7_e;

  typedef logic [XLEN-1:0]       word_t;
  typedef logic [PICOS_ID_W-1:0] picos_id_t;

  // Initiate Task queue entry
  typedef struct packed {
    word_t      sw_id;
    logic [7:0] num_deps;
  } init_t;

  typedef enum logic { DEP_IN = 1'b0, DEP_OUT = 1'b1 } dep_dir_e;

  // Dependence queue entry: one or two pointers of the same direction
  typedef struct packed {
    dep_dir_e dir;
    logic     two;
    word_t    addr1;
    word_t    addr0;
  } dep_t;

  // One beat of a submission sequence towards Picos
  typedef enum logic [2:0] {
    BEAT_HDR     = 3'd0,  // data = number of dependences
    BEAT_SWID    = 3'd1,  // data = 64-bit software task identifier
    BEAT_INFO    = 3'd2,  // data = Add Info metadata
    BEAT_DEP_IN  = 3'd3,  // data = IN dependence address
    BEAT_DEP_OUT = 3'd4   // data = OUT dependence address
  } beat_kind_e;

  typedef struct packed {
    beat_kind_e kind;
    word_t      data;
  } sub_beat_t;

  // Ready task descriptor delivered by Picos
  typedef struct packed {
    picos_id_t picos_id;
    word_t     sw_id;
  } ready_t;

  // ---------------- Fast Task Scheduler IP core ----------------
  localparam logic [7:0] CMD_EXEC          = 8'h01;
  localparam logic [7:0] CMD_FINISHED      = 8'h03;
  localparam logic [7:0] CMD_EXEC_PERIODIC = 8'h05;
  localparam logic [7:0] ENTRY_VALID       = 8'h80;
  localparam logic [7:0] ENTRY_INVALID     = 8'h00;

  // Words of a command read from the command-in queue: header, task id,
  // parent task id, one more word for periodic tasks, two words per argument.
  function automatic int unsigned cmd_words(logic [7:0] code, logic [7:0] nargs);
    return 32'd3 + ((code == CMD_EXEC_PERIODIC) ? 32'd1 : 32'd0) + 32'd2 * 32'(nargs);
  endfunction

endpackage
