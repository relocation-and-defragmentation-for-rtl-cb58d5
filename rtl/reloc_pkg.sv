// Shared constants, types and helper functions of the task relocation system.
//
// The system moves hardware tasks on a column-configured FPGA (1D placement model): every
// configuration column is either a logic (CLB) column or a BlockRAM column. A task occupies a
// contiguous run of columns starting at its leftmost column x (1-based, x = 1 is the leftmost
// column of the device). Frame sizes and frame counts follow the Virtex-II figures used by the
// design: 824-byte frames, 2 state frames per CLB column (each read behind a pad frame), 64
// content frames plus one pad frame per BlockRAM column, 22 frames per CLB column and 86 per
// BlockRAM column on allocation, and the relocation cost (48 N_clb + 237 N_ram) frames.
//
// Own choices: the frame address is an abstract {column, minor frame} pair rather than the
// vendor's encoding; the device map (72 CLB + 6 BlockRAM columns of an XC2V4000, BlockRAM column
// positions evenly spread) and the minor numbers of the two flip-flop state frames are
// parameters chosen here.
package reloc_pkg;

  // ---- configuration frame geometry -------------------------------------------------------
  parameter int unsigned FRAME_BYTES        = 824; // bytes per frame (XC2V4000)
  parameter int unsigned CLB_ALLOC_FRAMES   = 22;  // frames per CLB column
  parameter int unsigned RAM_ALLOC_FRAMES   = 86;  // frames per BlockRAM column
  parameter int unsigned CLB_STATE_FRAMES   = 2;   // frames holding flip-flop states
  parameter int unsigned RAM_CONTENT_FRAMES = 64;  // frames holding BlockRAM contents
  parameter int unsigned STATE_MINOR0       = 2;   // minor address of 1st state frame (own choice)
  parameter int unsigned STATE_MINOR1       = 3;   // minor address of 2nd state frame (own choice)

  // ---- relocation cost, eq. (3), in frames: T_reloc = cost * FRAME_BYTES / f_SelectMAP -------
  parameter int unsigned COST_CLB = 48;  // 4 read + 22 write + 22 erase frames
  parameter int unsigned COST_RAM = 237; // 65 read + 86 write + 86 erase frames

  // ---- device -----------------------------------------------------------------------------
  parameter int unsigned COL_W    = 7;   // width of a column number (1..127)
  parameter int unsigned DEV_COLS = 78;  // 72 CLB + 6 BlockRAM columns
  // bit (x-1) set: column x is a BlockRAM column
  parameter logic [DEV_COLS-1:0] DEV_RAM_MAP =
      (78'd1 << 6) | (78'd1 << 19) | (78'd1 << 32) | (78'd1 << 45) | (78'd1 << 58) | (78'd1 << 71);

  typedef logic [COL_W-1:0] col_t;

  // abstract frame address: column (major) and frame within the column (minor)
  typedef struct packed {
    col_t       major;
    logic [6:0] minor;
  } far_t;

  // one byte of a frame stream; first/last mark frame boundaries, eos the end of the stream
  typedef struct packed {
    logic [7:0] data;
    far_t       faddr;
    logic       first;
    logic       last;
    logic       eos;
  } fbeat_t;

  // a run of consecutive state bits: bit offset within the concatenated frame data of a
  // stream, and run length (>= 1)
  parameter int unsigned LOC_OFS_W = 24;
  parameter int unsigned LOC_LEN_W = 20;
  typedef struct packed {
    logic [LOC_OFS_W-1:0] offset;
    logic [LOC_LEN_W-1:0] len;
  } loc_t;

  // configuration port command: read returns (nframes + 1) frames, the first a pad frame;
  // write expects nframes frames of data
  typedef enum logic { CP_READ = 1'b0, CP_WRITE = 1'b1 } cp_op_e;
  typedef struct packed {
    cp_op_e     op;
    far_t       faddr;
    logic [6:0] nframes;
  } cp_cmd_t;

  // ---- task library (per task type) and placed tasks (per slot) -----------------------------
  parameter int unsigned TYPE_W = 3;  // up to 8 task types
  parameter int unsigned POS_W  = 7;  // index into the feasible position list
  parameter int unsigned LOC_AW = 14; // location memory address width
  parameter int unsigned STATE_AW = 16; // context area of one task: 64 KB (offset width)
  parameter int unsigned SLOT_AW  = 4;  // up to 16 placed tasks
  parameter int unsigned CTX_AW   = SLOT_AW + STATE_AW; // state buffer address {slot, offset}

  typedef struct packed {
    col_t              width;     // a_x(m): columns occupied
    col_t              n_ram;     // BlockRAM columns among them
    col_t              orig_col;  // leftmost column of the pre-implemented bitstream
    logic [POS_W:0]    n_pos;     // |X_pos(m)|
    logic [31:0]       bs_addr;   // allocation bitstream address
    logic [LOC_AW-1:0] cap_base;  // state locations in the readback stream
    logic [LOC_AW:0]   cap_cnt;
    logic [LOC_AW-1:0] inc_base;  // preset-bit locations in the allocation bitstream
    logic [LOC_AW:0]   inc_cnt;
  } type_info_t;

  typedef struct packed {
    logic              valid;
    logic [TYPE_W-1:0] ttype;
    col_t              start;
  } slot_t;

  // relocation cost of one task in frames, eq. (3)
  function automatic logic [31:0] reloc_cost(input col_t width, input col_t n_ram);
    return COST_CLB * 32'(width - n_ram) + COST_RAM * 32'(n_ram);
  endfunction

  // column mask of a task of the given width placed at column x (bit x-1 upward)
  function automatic logic [DEV_COLS-1:0] col_mask(input col_t x, input col_t width);
    logic [DEV_COLS-1:0] m;
    for (int c = 0; c < DEV_COLS; c++)
      m[c] = (c + 1 >= int'(x)) && (c + 1 < int'(x) + int'(width));
    return m;
  endfunction

endpackage
