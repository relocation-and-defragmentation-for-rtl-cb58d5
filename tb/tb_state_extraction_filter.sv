// Testbench of the State Extraction Filter.
// Random readback streams (bytes with frame tags) and random sorted state location runs (single
// bits like flip-flops, adjacent runs, long runs like BlockRAM contents). The expected state
// bytes are built here bit by bit (bit k of byte n has offset 8n + k; states packed LSB
// first). Checks every byte written to the state buffer, the bit count and, for streams
// without gaps, the cycle count: one cycle per byte, one extra per run that ends inside a byte
// and is followed by another run, plus two cycles of start and flush.
module tb_state_extraction_filter;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 start;
  logic [LOC_AW-1:0]    loc_base;
  logic [LOC_AW:0]      loc_cnt;
  logic [LOC_AW-1:0]    loc_addr;
  loc_t                 loc_data;
  logic                 in_valid, in_ready;
  fbeat_t               in_beat;
  logic                 st_we;
  logic [STATE_AW-1:0]  st_waddr;
  logic [7:0]           st_wdata;
  logic [LOC_OFS_W-1:0] nbits;
  logic                 busy, done;

  loc_t       locmem [1 << LOC_AW];
  logic [7:0] stmem  [int];
  assign loc_data = locmem[loc_addr];
  always_ff @(posedge clk) if (st_we) stmem[int'(st_waddr)] = st_wdata;

  state_extraction_filter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] data [];
  bit         expbits [$];

  task automatic one(input int nbytes, input int style, input bit gaps, input string tag);
    int nruns = 0, holds = 0, pos = 0, cyc = 0, sent = 0, base;
    int total_bits = nbytes * 8;
    data = new[nbytes];
    foreach (data[i]) data[i] = 8'($urandom);
    base = $urandom_range(0, 1000);
    expbits.delete();
    // build runs
    pos = $urandom_range(0, 20);
    while (pos < total_bits) begin
      int len;
      case (style)
        0: len = 1;                                       // flip-flop bits
        1: len = $urandom_range(1, 12);
        default: len = ($urandom_range(0, 5) == 0) ? $urandom_range(100, 3000) : $urandom_range(1, 9);
      endcase
      if (pos + len > total_bits) len = total_bits - pos;
      locmem[base + nruns] = '{offset: LOC_OFS_W'(pos), len: LOC_LEN_W'(len)};
      for (int b = pos; b < pos + len; b++) expbits.push_back(data[b / 8][b % 8]);
      nruns++;
      pos += len;
      pos += (style == 0) ? $urandom_range(1, 40) : $urandom_range(0, 30);
    end
    for (int r = 0; r < nruns - 1; r++)
      if (((locmem[base + r].offset + LOC_OFS_W'(locmem[base + r].len)) % 8) != 0) holds++;
    stmem.delete();
    loc_base = LOC_AW'(base);
    loc_cnt  = (LOC_AW+1)'(nruns);
    start = 1; @(posedge clk); #1; start = 0; cyc = 1;
    while (!done) begin
      in_valid = (sent < nbytes) && (!gaps || $urandom_range(0, 2) != 0);
      if (sent < nbytes) begin
        in_beat.data  = data[sent];
        in_beat.faddr = '{major: col_t'(sent / 100), minor: 7'(sent % 7)};
        in_beat.first = (sent % 100 == 0);
        in_beat.last  = (sent % 100 == 99);
        in_beat.eos   = (sent == nbytes - 1);
      end
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      #1; cyc++;
    end
    in_valid = 0;
    @(posedge clk); #1;   // the write registered with done lands in the buffer
    check(int'(nbits) == expbits.size(), $sformatf("%s: %0d state bits, expected %0d", tag, nbits, expbits.size()));
    for (int i = 0; i < (expbits.size() + 7) / 8; i++) begin
      logic [7:0] e = '0;
      for (int k = 0; k < 8 && 8 * i + k < expbits.size(); k++) e[k] = expbits[8 * i + k];
      check(stmem.exists(i) && stmem[i] == e, $sformatf("%s: state byte %0d", tag, i));
    end
    check(!stmem.exists((expbits.size() + 7) / 8), $sformatf("%s: nothing written beyond the states", tag));
    if (!gaps) check(cyc == nbytes + holds + 2, $sformatf("%s: %0d cycles, expected %0d", tag, cyc, nbytes + holds + 2));
  endtask

  initial begin
    start = 0; loc_base = '0; loc_cnt = '0; in_valid = 0; in_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    one(2 * FRAME_BYTES, 0, 0, "two state frames, single bits");
    one(64 * FRAME_BYTES / 8, 2, 0, "long runs");
    for (int t = 0; t < 60; t++) one($urandom_range(1, 600), t % 3, t % 2 == 1, $sformatf("random %0d", t));
    // empty location list: nothing is stored
    loc_base = '0; loc_cnt = '0;
    begin
      int n = 50;
      data = new[n];
      stmem.delete();
      start = 1; @(posedge clk); #1; start = 0;
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_beat = '0; in_beat.data = 8'(i); in_beat.eos = (i == n - 1);
        @(posedge clk); #1;
      end
      in_valid = 0;
      repeat (3) @(posedge clk);
      check(stmem.num() == 0 && nbits == 0, "empty list stores nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
