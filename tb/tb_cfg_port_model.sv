// Behavioural model of the FPGA configuration port (SelectMAP/ICAP) and configuration memory,
// for simulation only. Frames are kept sparsely in an associative array keyed by
// {column, minor, byte}; unwritten bytes read as preset_byte(). A read command returns one pad
// frame (all 8'hA5) followed by the requested frames; a write command takes nframes frames.
// One byte per cycle; when STALL is set, valid/ready are dropped pseudo-randomly.
module tb_cfg_port_model
  import reloc_pkg::*;
#(
  parameter int unsigned FRAME_B = FRAME_BYTES,
  parameter bit          STALL   = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cp_cmd_valid,
  output logic       cp_cmd_ready,
  input  cp_cmd_t    cp_cmd,
  output logic       cp_rd_valid,
  input  logic       cp_rd_ready,
  output logic [7:0] cp_rd_data,
  input  logic       cp_wr_valid,
  output logic       cp_wr_ready,
  input  logic [7:0] cp_wr_data
);
  logic [7:0] mem [longint];
  longint unsigned rd_bytes, wr_bytes, n_rd_cmd, n_wr_cmd;

  typedef enum logic [1:0] {M_IDLE, M_RD, M_WR} mstate_e;
  mstate_e    st;
  cp_cmd_t    cmd;
  int unsigned fr, bi;
  logic        gate;

  function automatic longint key(input int col, input int minor, input int b);
    return (longint'(col) * 128 + longint'(minor)) * FRAME_B + longint'(b);
  endfunction

  function automatic logic [7:0] peek(input int col, input int minor, input int b);
    longint k = key(col, minor, b);
    if (mem.exists(k)) return mem[k];
    return 8'(col * 37 + minor * 11 + b * 3 + 1);
  endfunction

  task automatic poke(input int col, input int minor, input int b, input logic [7:0] v);
    mem[key(col, minor, b)] = v;
  endtask

  always_ff @(posedge clk) gate <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;

  assign cp_cmd_ready = (st == M_IDLE);
  assign cp_rd_valid  = (st == M_RD) && gate;
  assign cp_wr_ready  = (st == M_WR) && gate;
  always_comb begin
    if (st == M_RD && fr != 0) cp_rd_data = peek(int'(cmd.faddr.major), int'(cmd.faddr.minor) + int'(fr) - 1, int'(bi));
    else                        cp_rd_data = 8'hA5;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      fr <= 0;
      bi <= 0;
      rd_bytes <= 0; wr_bytes <= 0; n_rd_cmd <= 0; n_wr_cmd <= 0;
    end else begin
      case (st)
        M_IDLE: if (cp_cmd_valid) begin
          cmd <= cp_cmd;
          bi  <= 0;
          if (cp_cmd.op == CP_READ) begin st <= M_RD; fr <= 0; n_rd_cmd <= n_rd_cmd + 1; end
          else begin st <= M_WR; fr <= 1; n_wr_cmd <= n_wr_cmd + 1; end
        end
        M_RD: if (cp_rd_valid && cp_rd_ready) begin
          rd_bytes <= rd_bytes + 1;
          if (bi == FRAME_B - 1) begin
            bi <= 0;
            if (fr == int'(cmd.nframes)) st <= M_IDLE;
            fr <= fr + 1;
          end else bi <= bi + 1;
        end
        M_WR: if (cp_wr_valid && cp_wr_ready) begin
          wr_bytes <= wr_bytes + 1;
          mem[key(int'(cmd.faddr.major), int'(cmd.faddr.minor) + int'(fr) - 1, int'(bi))] = cp_wr_data;
          if (bi == FRAME_B - 1) begin
            bi <= 0;
            if (fr == int'(cmd.nframes)) st <= M_IDLE;
            fr <= fr + 1;
          end else bi <= bi + 1;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
