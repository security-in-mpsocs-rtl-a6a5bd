// fw_pkg: types and constants shared by the NoC firewall blocks.
//
// The firewall checks the page number of a 32-bit physical address (the address
// with its L = 12 offset bits removed, the ARM v7 page offset) against up to 16
// programmable segments and, on a match, looks up an 8-bit deny rule that is
// selected by the current 6-bit process identifier (PID) and the segment index.
// These sizes (16 segments, 64 PIDs, 8-bit rules, 1024x8 rule memory, 20-bit
// page number) are those of the published FPGA prototype. The command opcodes,
// the bit order of the rule and the interrupt cause numbering are this design's
// own choices.
package fw_pkg;

  // Sizes of the FPGA prototype.
  localparam int unsigned ADDR_W   = 32;  // physical address width
  localparam int unsigned OFFSET_W = 12;  // L: page offset bits ignored by the check
  localparam int unsigned PAGE_W   = ADDR_W - OFFSET_W;  // 20-bit page number
  localparam int unsigned RULE_W   = 8;   // one deny rule
  localparam int unsigned DATA_W   = 32;  // bus width of the prototype
  localparam int unsigned CNT_W    = 32;  // monitor counters

  // Bit positions inside an 8-bit deny rule, in the order the subfields are
  // listed: read, write, data, execute, privileged, non-privileged, secure,
  // non-secure. A rule denies an access when, in each of the four pairs, the bit
  // of the access's own attribute is set. A rule of all zeros denies nothing.
  localparam int unsigned R_READ    = 0;
  localparam int unsigned R_WRITE   = 1;
  localparam int unsigned R_DATA    = 2;
  localparam int unsigned R_EXEC    = 3;
  localparam int unsigned R_PRIV    = 4;
  localparam int unsigned R_NONPRIV = 5;
  localparam int unsigned R_SECURE  = 6;
  localparam int unsigned R_NONSEC  = 7;

  // A memory request as it arrives from the CPU side of the NI.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              write;   // 1: write, 0: read
    logic              instr;   // 1: instruction (execute) access, 0: data
    logic              priv;    // 1: privileged mode
    logic              secure;  // 1: secure world
    logic [DATA_W-1:0] data;    // write data / payload, carried unchanged
  } fw_req_t;

  // Configuration commands.
  typedef enum logic [3:0] {
    CMD_ADD_SEG    = 4'h1,  // write (start,end) of segment seg and make it valid
    CMD_DEL_ALL    = 4'h2,  // invalidate every segment
    CMD_SET_RULE   = 4'h3,  // write the rule of (pid, seg)
    CMD_DEL_RULE   = 4'h4,  // delete the rule of (pid, seg): write all zeros
    CMD_SET_PID    = 4'h5,  // the OS sets the PID of the running process
    CMD_SET_ENABLE = 4'h6,  // enable (rule bit 0 = 1) or disable the checking
    CMD_SET_THRESH = 4'h7,  // deny-count threshold of the monitor (0: off)
    CMD_CLR_MON    = 4'h8   // clear the monitor counters and timer
  } fw_op_e;

  typedef struct packed {
    logic [3:0]        op;     // fw_op_e; other codes are invalid commands
    logic [3:0]        seg;    // segment index
    logic [5:0]        pid;    // process identifier
    logic [PAGE_W-1:0] start;  // first page of the segment (inclusive)
    logic [PAGE_W-1:0] last;   // last page of the segment (inclusive)
    logic [RULE_W-1:0] rule;   // rule, enable flag or threshold (low bits)
  } fw_cmd_t;

  // Item dispatched by the OMC to the SLRC: a command, or a request tagged
  // with the operating mode (PID of the running process, checking enabled).
  typedef struct packed {
    logic    is_cmd;
    fw_cmd_t cmd;
    fw_req_t req;
    logic [5:0] pid;
    logic    en;
  } fw_disp_t;

  // Interrupt causes, one bit each in the INTU.
  localparam int unsigned N_IRQ      = 3;
  localparam int unsigned IRQ_DENY   = 0;  // SLRC rule check denied an access
  localparam int unsigned IRQ_BADCMD = 1;  // OMC received an invalid command
  localparam int unsigned IRQ_THRESH = 2;  // monitor deny counter reached threshold

  // Context of a denied access, reported through the INTU.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [5:0]        pid;
    logic [3:0]        seg;
    logic [RULE_W-1:0] rule;
    logic              write;
    logic              instr;
    logic              priv;
    logic              secure;
  } fw_deny_ctx_t;

  // Decision of a rule against an access (combinational helper).
  function automatic logic rule_denies(logic [RULE_W-1:0] rule, logic write,
                                       logic instr, logic priv, logic secure);
    logic op_hit, kind_hit, mode_hit, world_hit;
    op_hit    = write  ? rule[R_WRITE]  : rule[R_READ];
    kind_hit  = instr  ? rule[R_EXEC]   : rule[R_DATA];
    mode_hit  = priv   ? rule[R_PRIV]   : rule[R_NONPRIV];
    world_hit = secure ? rule[R_SECURE] : rule[R_NONSEC];
    return op_hit & kind_hit & mode_hit & world_hit;
  endfunction

endpackage
