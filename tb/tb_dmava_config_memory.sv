// tb_dmava_config_memory: end-to-end test of the DMA-VA configuration
// memory at a reduced size (26 frames of 6 bytes: three full blocks and a
// two-frame remainder block). It sends a series of configuration runs,
// each a header (start block, block count) followed per row by a VA byte
// and the selected data bytes, keeps a byte-level model of every frame,
// and compares the whole memory with the model after every run. It also
// checks that each run completes in one clock per stream byte and that busy
// and op_done frame it. Every mechanism is counted and must occur: rows
// skipped by a zero VA, partial rows, full rows, multi-block runs, runs
// that reach the short last block, bytes aimed at absent frames, runs past
// the end of the device, zero-length runs and idle port cycles.
module tb_dmava_config_memory;
  import dmava_pkg::*;
  localparam int NF = 26;
  localparam int FB = 6;
  localparam int NB = (NF + 7) / 8;

  logic       clk = 0, rst_n = 0, cfg_valid = 0;
  cbyte_t     cfg_data = 0;
  logic       busy, op_done;
  logic [7:0] cfg_bits [NF][FB];
  logic [7:0] model    [NF][FB];
  int checks = 0, failures = 0, cyc = 0;
  int n_zero_row = 0, n_partial_row = 0, n_full_row = 0, n_multi = 0, n_lastblk = 0;
  int n_absent = 0, n_past_end = 0, n_empty_run = 0, n_idle = 0;

  dmava_config_memory #(.NUM_FRAMES(NF), .FRAME_BYTES(FB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cycle=%0d", what, cyc);
    end
  endtask

  task automatic compare_memory(input string what);
    int bad = 0;
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < FB; r++)
        if (cfg_bits[f][r] != model[f][r]) begin
          if (bad < 4) $display("  frame %0d byte %0d: got %h expected %h", f, r, cfg_bits[f][r], model[f][r]);
          bad++;
        end
    check(bad == 0, what);
  endtask

  // Send one byte; with idle_pct > 0 idle cycles are inserted at random.
  task automatic send(input cbyte_t b, input int idle_pct);
    while ($urandom_range(99) < idle_pct) begin
      cfg_valid = 0;
      @(posedge clk); #1;
      n_idle++;
    end
    cfg_valid = 1; cfg_data = b;
    @(posedge clk); #1;
    cfg_valid = 0;
  endtask

  // One configuration run. row_mode: 0 random, 1 all-zero VA, 2 all-ones VA.
  task automatic run(input int start, input int count, input int idle_pct, input int row_mode);
    int bytes = 0, t0, t_end;
    bit saw_done = 0;
    t0 = cyc;
    send(8'(start >> 8), idle_pct); send(8'(start), idle_pct);
    send(8'(count >> 8), idle_pct); send(8'(count), idle_pct);
    bytes = 4;
    if (count == 0) begin
      n_empty_run++;
      check(op_done && !busy, "empty run ends at once");
      saw_done = op_done;
    end else begin
      check(busy, "busy after header");
    end
    if (count > 1) n_multi++;
    if (start >= NB) n_past_end++;
    for (int bi = 0; bi < count; bi++) begin
      int blk = start + bi;
      if (blk == NB - 1) n_lastblk++;
      for (int r = 0; r < FB; r++) begin
        cbyte_t va;
        case (row_mode)
          1: va = 8'h00;
          2: va = 8'hff;
          default: va = ($urandom_range(3) == 0) ? 8'h00 : 8'($urandom);
        endcase
        if (va == 0) n_zero_row++;
        else if (va == 8'hff) n_full_row++;
        else n_partial_row++;
        send(va, idle_pct); bytes++;
        for (int j = 7; j >= 0; j--) begin
          if (va[j]) begin
            cbyte_t d = 8'($urandom);
            int f = blk * 8 + j;
            if (blk < NB && f < NF) model[f][r] = d;
            else if (blk == NB - 1) n_absent++;
            send(d, idle_pct); bytes++;
          end
        end
      end
    end
    if (count != 0) saw_done = op_done;
    t_end = cyc;
    check(saw_done, "op_done at end of run");
    check(!busy, "idle after run");
    if (idle_pct == 0) check(t_end - t0 == bytes, "one clock per byte");
    compare_memory("memory after run");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) for (int r = 0; r < FB; r++) model[f][r] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    compare_memory("memory cleared by reset");
    run(0, NB, 0, 2);        // full device write, every byte
    run(1, 1, 0, 0);         // one block, random rows
    run(0, 2, 20, 0);        // two blocks with idle port cycles
    run(NB - 1, 1, 0, 2);    // short last block, bytes for absent frames
    run(2, 0, 0, 0);         // zero-length run
    run(2, 1, 0, 1);         // all rows skipped: memory must be unchanged
    run(NB, 2, 0, 0);        // past the end of the device
    for (int k = 0; k < 20; k++) begin
      int s = $urandom_range(NB - 1);
      run(s, $urandom_range(1, NB - s), $urandom_range(1) * 15, 0);
    end
    $display("mechanisms: zero_row=%0d partial_row=%0d full_row=%0d multi_block=%0d last_block=%0d absent=%0d past_end=%0d empty_run=%0d idle=%0d",
             n_zero_row, n_partial_row, n_full_row, n_multi, n_lastblk, n_absent, n_past_end, n_empty_run, n_idle);
    check(n_zero_row > 0, "zero-VA row seen");
    check(n_partial_row > 0, "partial row seen");
    check(n_full_row > 0, "full row seen");
    check(n_multi > 0, "multi-block run seen");
    check(n_lastblk > 0, "short last block seen");
    check(n_absent > 0, "absent frame bytes seen");
    check(n_past_end > 0, "run past end seen");
    check(n_empty_run > 0, "zero-length run seen");
    check(n_idle > 0, "idle port cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
