// rf_bank_array_tb: checks the storage of one register-file bank.
// Random reads and writes on both intra-ports in both slots (never a read and a
// write of the same word in one slot, never A and B writing one word, as the
// conflict logic guarantees). Read data must match a plain [thread][register]
// model; S1 reads must see S0 writes of the same cycle; each write must land 2:1
// bit-interleaved (bit b of a word in column c at physical column 2b+c of the
// subcell given by thread[1]) and leave the neighbouring word of the row unchanged.
`timescale 1ns / 1ps
module rf_bank_array_tb;
  import rf_pkg::*;
  logic clk = 0;
  ireq_t             rreq  [NUM_SLOTS][2];
  logic [DATA_W-1:0] rdata [NUM_SLOTS][2];
  ireq_t             wreq  [NUM_SLOTS][2];
  logic [DATA_W-1:0] wdata [NUM_SLOTS][2];
  rf_bank_array dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_s1_fwd = 0;
  logic [DATA_W-1:0] ref_mem [NUM_THREADS][2**REG_W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic ireq_t mk(bit en, int loc);
    ireq_t r;
    r = '0; r.en = en; r.loc = baddr_t'(loc);
    return r;
  endfunction

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) begin
      rreq[s][p] = '0; wreq[s][p] = '0; wdata[s][p] = '0;
    end
    // fill all 32 words, four per cycle
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) begin
        wreq[s][p] = mk(1, i * 4 + s * 2 + p);
        wdata[s][p] = $urandom;
        ref_mem[(i*4+s*2+p) >> REG_W][(i*4+s*2+p) % (2**REG_W)] = wdata[s][p];
      end
    end
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      logic [DATA_W-1:0] pre [NUM_THREADS][2**REG_W];
      logic [DATA_W-1:0] mid [NUM_THREADS][2**REG_W];
      for (int s = 0; s < 2; s++) begin
        for (int p = 0; p < 2; p++) begin
          rreq[s][p] = mk($urandom_range(1), $urandom_range(31));
          wreq[s][p] = mk($urandom_range(1), $urandom_range(31));
          wdata[s][p] = $urandom;
        end
        // keep to the rules the conflict logic enforces
        for (int p = 0; p < 2; p++)
          for (int r = 0; r < 2; r++)
            if (rreq[s][r].en && wreq[s][p].en && rreq[s][r].loc == wreq[s][p].loc) wreq[s][p].en = 0;
        if (wreq[s][0].en && wreq[s][1].en && wreq[s][0].loc == wreq[s][1].loc) wreq[s][1].en = 0;
      end
      pre = ref_mem;
      mid = ref_mem;
      for (int p = 0; p < 2; p++)
        if (wreq[0][p].en) mid[wreq[0][p].loc.thread][wreq[0][p].loc.rnum] = wdata[0][p];
      ref_mem = mid;
      for (int p = 0; p < 2; p++)
        if (wreq[1][p].en) ref_mem[wreq[1][p].loc.thread][wreq[1][p].loc.rnum] = wdata[1][p];
      #1;
      for (int p = 0; p < 2; p++) begin
        if (rreq[0][p].en)
          check(rdata[0][p] == pre[rreq[0][p].loc.thread][rreq[0][p].loc.rnum], $sformatf("it %0d S0 read", it));
        if (rreq[1][p].en) begin
          check(rdata[1][p] == mid[rreq[1][p].loc.thread][rreq[1][p].loc.rnum], $sformatf("it %0d S1 read", it));
          if (mid[rreq[1][p].loc.thread][rreq[1][p].loc.rnum] != pre[rreq[1][p].loc.thread][rreq[1][p].loc.rnum])
            n_s1_fwd++;
        end
      end
      @(negedge clk);
      // physical placement of every written word and of its row neighbour
      for (int s = 0; s < 2; s++)
        for (int p = 0; p < 2; p++)
          if (wreq[s][p].en) begin
            int t, r, w, row, col, nb;
            t = wreq[s][p].loc.thread; r = wreq[s][p].loc.rnum;
            w = (t % 2) * (2**REG_W) + r;
            row = w / INTERLEAVE; col = w % INTERLEAVE; nb = r ^ 1;
            for (int b = 0; b < DATA_W; b++) begin
              check(dut.mem[t / 2][row][b*INTERLEAVE + col] == ref_mem[t][r][b], "placement");
              check(dut.mem[t / 2][row][b*INTERLEAVE + (col ^ 1)] == ref_mem[t][nb][b], "neighbour");
            end
          end
    end
    check(n_s1_fwd > 0, "S1 never read an S0 write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
