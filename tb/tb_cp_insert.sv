// tb_cp_insert: writes blocks of 64 samples (LOG2N=6) in scrambled index
// order, as an IFFT would in any order, and checks the line: the last CP
// samples then the whole block, with CP = CP_Length + 1, the 14-bit DAC
// word (two LSBs dropped), the sym_start/dft_start markers, idle zeros
// between blocks when none is ready, back-to-back symbols when the next is
// ready, in_ready flow control and a CP_Length change between symbols.
module tb_cp_insert;
  import dmt_tb_pkg::*;
  localparam int LOG2N = 6;
  localparam int N = 1 << LOG2N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [8:0]  cp_length = 9'd15;
  logic        in_valid = 1'b0, in_done = 1'b0, in_ready;
  logic [11:0] in_idx = '0;
  logic signed [15:0] in_re = '0;
  logic signed [13:0] dac_data;
  logic        sym_start, dft_start, idle;

  always #5 clk = ~clk;

  cp_insert #(.LOG2N(LOG2N)) dut (.*);

  // expected line: queue of (sample, sym_start, dft_start)
  int exp_q[$];
  int blocks_sent = 0, symbols_seen = 0, idle_cycles = 0, b2b = 0;
  int cur_cp = 16;
  bit prev_last = 0;

  task automatic write_block(input int seed);
    int perm[N];
    int blk[N];
    for (int i = 0; i < N; i++) begin perm[i] = i; blk[i] = $urandom_range(65535) - 32768; end
    perm.shuffle();
    while (!in_ready) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      in_valid = 1'b1; in_idx = 12'(perm[i]); in_re = 16'(blk[perm[i]]);
      in_done = (i == N - 1);
      @(negedge clk);
    end
    in_valid = 1'b0; in_done = 1'b0;
    for (int t = 0; t < cur_cp; t++) exp_q.push_back(blk[N - cur_cp + t]);
    for (int t = 0; t < N; t++) exp_q.push_back(blk[t]);
    blocks_sent++;
  endtask

  // line checker
  int pos_in_sym = -1, sym_len = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (idle) begin
      check(dac_data == 0 && !sym_start && !dft_start, "idle line is zero");
      idle_cycles++;
      pos_in_sym = -1;
    end else begin
      int want;
      check(exp_q.size() > 0, "sample without a block");
      want = exp_q.pop_front();
      check(dac_data == 14'(want >>> 2), $sformatf("sample got %0d want %0d", dac_data, want >>> 2));
      if (sym_start) begin
        if (pos_in_sym >= 0) b2b++;
        pos_in_sym = 0; symbols_seen++;
      end else pos_in_sym++;
      check(dft_start == (pos_in_sym == sym_len - N), $sformatf("dft_start at %0d", pos_in_sym));
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sym_len = 16 + N;
    @(negedge clk);
    check(idle && in_ready, "idle and ready after reset");
    write_block(1);           // plays immediately
    write_block(2);           // second buffer fills while the first plays
    check(!in_ready, "both buffers busy -> not ready");
    write_block(3);           // waits for a free buffer
    // wait until drained, then change CP length
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    cp_length = 9'd2; cur_cp = 3; sym_len = 3 + N;
    write_block(4);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(symbols_seen == 4, $sformatf("symbols %0d", symbols_seen));
    check(b2b >= 1, "back-to-back symbols happened");
    check(idle_cycles > 0, "idle gaps happened");
    report();
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
