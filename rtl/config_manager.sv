// Configuration Manager: the only user of the FPGA configuration port (SelectMAP/ICAP).
//
// Three operations, each started by a one-cycle pulse and ended by a one-cycle `done`:
//  * capture (start_cap): for every column from col_first to col_last it reads only the frames
//    that hold state. A CLB column costs two read accesses of one frame each (minor addresses
//    STATE_MINOR0 and STATE_MINOR1); a BlockRAM column costs one access of 64 frames. The port
//    returns a pad frame in front of every access; the manager drops it and passes the state
//    frames on as a byte stream (rb_*) tagged with frame address and frame boundaries, `eos` on
//    the very last byte. Bytes read = (4 N_clb + 65 N_ram) * FRAME_BYTES, one byte per cycle
//    when nobody stalls.
//  * erase (start_del): writes an empty configuration over the columns, 22 frames per CLB
//    column and 86 per BlockRAM column, one write access per column, zero bytes.
//  * write (start_wr): forwards a frame stream (wr_*) to the port, one write access per frame at
//    the frame's own address, until the beat marked `eos`.
// The column map (which columns are BlockRAM) is the RAM_MAP parameter. Frame and access counts
// follow the design description; the command/handshake form of the port is this design's own
// abstraction of the vendor protocol (cp_cmd is accepted on valid & ready; data moves on
// valid & ready, one byte per beat).
module config_manager
  import reloc_pkg::*;
#(
  parameter int unsigned             FRAME_B = FRAME_BYTES,
  parameter logic [DEV_COLS-1:0]     RAM_MAP = DEV_RAM_MAP
) (
  input  logic       clk,
  input  logic       rst_n,
  // operation control
  input  logic       start_cap,
  input  logic       start_del,
  input  logic       start_wr,
  input  col_t       col_first,
  input  col_t       col_last,
  output logic       busy,
  output logic       done,
  // configuration port
  output logic       cp_cmd_valid,
  input  logic       cp_cmd_ready,
  output cp_cmd_t    cp_cmd,
  input  logic       cp_rd_valid,
  output logic       cp_rd_ready,
  input  logic [7:0] cp_rd_data,
  output logic       cp_wr_valid,
  input  logic       cp_wr_ready,
  output logic [7:0] cp_wr_data,
  // readback state frames to the State Extraction Filter
  output logic       rb_valid,
  input  logic       rb_ready,
  output fbeat_t     rb_beat,
  // relocated bitstream frames from the relocation filter
  input  logic       wr_valid,
  output logic       wr_ready,
  input  fbeat_t     wr_beat
);

  typedef enum logic [2:0] {S_IDLE, S_CCMD, S_CDATA, S_DCMD, S_DDATA, S_WCMD, S_WDATA} state_e;
  state_e state;

  col_t        col, last_col;
  logic        second;           // second state frame of a CLB column
  logic [6:0]  frame;            // frame index within the access (0 = pad on reads)
  logic [6:0]  nfr;              // frames of the current access
  logic [10:0] byte_i;           // byte within the frame
  far_t        far_cur;

  wire is_ram   = RAM_MAP[col - col_t'(1)];
  wire last_byte = (byte_i == 11'(FRAME_B - 1));

  // ---- command generation --------------------------------------------------------------------
  always_comb begin
    cp_cmd_valid = 1'b0;
    cp_cmd       = '0;
    unique case (state)
      S_CCMD: begin
        cp_cmd_valid  = 1'b1;
        cp_cmd.op     = CP_READ;
        cp_cmd.faddr.major = col;
        cp_cmd.faddr.minor = is_ram ? 7'd0 : (second ? 7'(STATE_MINOR1) : 7'(STATE_MINOR0));
        cp_cmd.nframes   = is_ram ? 7'(RAM_CONTENT_FRAMES) : 7'd1;
      end
      S_DCMD: begin
        cp_cmd_valid  = 1'b1;
        cp_cmd.op     = CP_WRITE;
        cp_cmd.faddr.major = col;
        cp_cmd.faddr.minor = 7'd0;
        cp_cmd.nframes   = is_ram ? 7'(RAM_ALLOC_FRAMES) : 7'(CLB_ALLOC_FRAMES);
      end
      S_WCMD: begin
        cp_cmd_valid  = wr_valid;
        cp_cmd.op     = CP_WRITE;
        cp_cmd.faddr    = wr_beat.faddr;
        cp_cmd.nframes = 7'd1;
      end
      default: ;
    endcase
  end

  // ---- data paths ----------------------------------------------------------------------------
  wire pad = (frame == 7'd0);
  wire last_col_now = (col == last_col);
  wire last_access  = last_col_now && (is_ram || second);

  always_comb begin
    cp_rd_ready      = 1'b0;
    rb_valid         = 1'b0;
    rb_beat          = '0;
    rb_beat.data     = cp_rd_data;
    rb_beat.faddr      = far_cur;
    rb_beat.first    = (byte_i == '0);
    rb_beat.last     = last_byte;
    rb_beat.eos      = last_byte && (frame == nfr) && last_access;
    cp_wr_valid      = 1'b0;
    cp_wr_data       = 8'h00;
    wr_ready         = 1'b0;
    if (state == S_CDATA) begin
      if (pad) cp_rd_ready = 1'b1;
      else begin
        rb_valid    = cp_rd_valid;
        cp_rd_ready = rb_ready;
      end
    end else if (state == S_DDATA) begin
      cp_wr_valid = 1'b1;
    end else if (state == S_WDATA) begin
      cp_wr_valid = wr_valid;
      cp_wr_data  = wr_beat.data;
      wr_ready    = cp_wr_ready;
    end
  end

  wire rd_fire = cp_rd_valid && cp_rd_ready;
  wire wr_fire = cp_wr_valid && cp_wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      col      <= '0;
      last_col <= '0;
      second   <= 1'b0;
      frame    <= '0;
      nfr      <= '0;
      byte_i   <= '0;
      far_cur  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          col      <= col_first;
          last_col <= col_last;
          second   <= 1'b0;
          if (start_cap)      state <= S_CCMD;
          else if (start_del) state <= S_DCMD;
          else if (start_wr)  state <= S_WCMD;
        end
        S_CCMD: if (cp_cmd_ready) begin
          frame   <= '0;
          byte_i  <= '0;
          nfr     <= cp_cmd.nframes;
          far_cur <= cp_cmd.faddr;
          state   <= S_CDATA;
        end
        S_CDATA: if (rd_fire) begin
          byte_i <= last_byte ? '0 : byte_i + 1'b1;
          if (last_byte) begin
            frame <= frame + 1'b1;
            if (!pad) far_cur.minor <= far_cur.minor + 1'b1;
            if (frame == nfr) begin
              // access complete
              if (last_access) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                state <= S_CCMD;
                if (is_ram || second) begin
                  second <= 1'b0;
                  col    <= col + 1'b1;
                end else second <= 1'b1;
              end
            end
          end
        end
        S_DCMD: if (cp_cmd_ready) begin
          frame  <= 7'd1;
          byte_i <= '0;
          nfr    <= cp_cmd.nframes;
          state  <= S_DDATA;
        end
        S_DDATA: if (wr_fire) begin
          byte_i <= last_byte ? '0 : byte_i + 1'b1;
          if (last_byte) begin
            frame <= frame + 1'b1;
            if (frame == nfr) begin
              if (last_col_now) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                col   <= col + 1'b1;
                state <= S_DCMD;
              end
            end
          end
        end
        S_WCMD: if (cp_cmd_valid && cp_cmd_ready) state <= S_WDATA;
        S_WDATA: if (wr_fire && wr_beat.last) begin
          if (wr_beat.eos) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_WCMD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
