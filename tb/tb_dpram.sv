// tb_dpram: the dual-port RAM against a model written here. Two instances cover all three
// write modes (left WRITE_FIRST / right NO_CHANGE, and READ_FIRST on both). Random accesses on
// both ports, biased towards a few addresses so that collisions happen, are checked for read
// data, busy lines (alternating priority) and interrupt flags; then the semaphore flags are
// exercised. Counts collisions won by each side and interrupts raised on each side.
module tb_dpram;
  import vd_pkg::*;
  localparam int DW = 8, DEPTH = 16, AW = 4;

  logic clk = 0, rst_n = 0;
  logic l_en, l_we, r_en, r_we;
  logic [AW-1:0] l_addr, r_addr;
  logic [DW-1:0] l_wdata, r_wdata;
  logic [DW-1:0] l_rdata [2], r_rdata [2];
  logic l_busy [2], r_busy [2], l_int [2], r_int [2];
  logic l_sem_req, l_sem_rel, r_sem_req, r_sem_rel;
  logic [2:0] l_sem_idx, r_sem_idx;
  logic [7:0] l_sem_own [2], r_sem_own [2];
  int checks = 0, failures = 0;
  int l_wins = 0, r_wins = 0, l_ints = 0, r_ints = 0;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    localparam dp_mode_e LM = (i == 0) ? WRITE_FIRST : READ_FIRST;
    localparam dp_mode_e RM = (i == 0) ? NO_CHANGE : READ_FIRST;
    dpram #(.DW(DW), .DEPTH(DEPTH), .L_MODE(LM), .R_MODE(RM), .NSEM(8)) dut (
      .clk, .rst_n,
      .l_en, .l_we, .l_addr, .l_wdata, .l_rdata(l_rdata[i]), .l_busy(l_busy[i]),
      .l_int(l_int[i]), .l_sem_req, .l_sem_rel, .l_sem_idx, .l_sem_own(l_sem_own[i]),
      .r_en, .r_we, .r_addr, .r_wdata, .r_rdata(r_rdata[i]), .r_busy(r_busy[i]),
      .r_int(r_int[i]), .r_sem_req, .r_sem_rel, .r_sem_idx, .r_sem_own(r_sem_own[i])
    );
  end

  always #5 clk = !clk;

  // Model state.
  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] mlr [2], mrr [2];
  bit prio_r, mli, mri;
  bit known [DEPTH];
  bit lr_known [2], rr_known [2];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l_en = 0; l_we = 0; r_en = 0; r_we = 0; l_addr = 0; r_addr = 0; l_wdata = 0; r_wdata = 0;
    l_sem_req = 0; l_sem_rel = 0; r_sem_req = 0; r_sem_rel = 0; l_sem_idx = 0; r_sem_idx = 0;
    for (int a = 0; a < DEPTH; a++) known[a] = 0;
    for (int i = 0; i < 2; i++) begin lr_known[i] = 0; rr_known[i] = 0; end
    prio_r = 0; mli = 0; mri = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    repeat (5000) begin
      bit coll, lb, rb, lgo, rgo;
      @(negedge clk);
      l_en = ($urandom_range(0, 3) != 0); r_en = ($urandom_range(0, 3) != 0);
      l_we = 1'($urandom_range(0, 1));    r_we = 1'($urandom_range(0, 1));
      l_addr = ($urandom_range(0, 2) == 0) ? AW'($urandom_range(0, DEPTH - 1)) : AW'($urandom_range(DEPTH - 3, DEPTH - 1));
      r_addr = ($urandom_range(0, 2) == 0) ? AW'($urandom_range(0, DEPTH - 1)) : AW'($urandom_range(DEPTH - 3, DEPTH - 1));
      l_wdata = DW'($urandom); r_wdata = DW'($urandom);
      #1;
      coll = l_en && r_en && l_addr == r_addr && (l_we || r_we);
      lb = coll && prio_r; rb = coll && !prio_r;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (l_busy[i] != lb || r_busy[i] != rb) begin
          failures++;
          $display("busy mismatch inst %0d: %0d%0d exp %0d%0d", i, l_busy[i], r_busy[i], lb, rb);
        end
      end
      if (coll) begin if (prio_r) r_wins++; else l_wins++; prio_r = !prio_r; end
      lgo = l_en && !lb; rgo = r_en && !rb;
      // read data model (per instance mode)
      if (lgo) begin
        if (l_we) begin
          mlr[0] = l_wdata; lr_known[0] = 1;           // WRITE_FIRST
          mlr[1] = mem[l_addr]; lr_known[1] = known[l_addr];  // READ_FIRST
        end else begin
          mlr[0] = mem[l_addr]; lr_known[0] = known[l_addr];
          mlr[1] = mem[l_addr]; lr_known[1] = known[l_addr];
        end
      end
      if (rgo) begin
        if (r_we) begin
          mrr[1] = mem[r_addr]; rr_known[1] = known[r_addr];  // READ_FIRST; NO_CHANGE holds
        end else begin
          mrr[0] = mem[r_addr]; rr_known[0] = known[r_addr];
          mrr[1] = mem[r_addr]; rr_known[1] = known[r_addr];
        end
      end
      if (lgo && !l_we && l_addr == AW'(DEPTH - 1)) mli = 0;
      if (rgo && r_we && r_addr == AW'(DEPTH - 1)) begin mli = 1; l_ints++; end
      if (rgo && !r_we && r_addr == AW'(DEPTH - 2)) mri = 0;
      if (lgo && l_we && l_addr == AW'(DEPTH - 2)) begin mri = 1; r_ints++; end
      if (lgo && l_we) begin mem[l_addr] = l_wdata; known[l_addr] = 1; end
      if (rgo && r_we) begin mem[r_addr] = r_wdata; known[r_addr] = 1; end
      @(posedge clk); #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if ((lr_known[i] && l_rdata[i] != mlr[i]) || (rr_known[i] && r_rdata[i] != mrr[i]) ||
            l_int[i] != mli || r_int[i] != mri) begin
          failures++;
          if (failures < 10)
            $display("inst %0d: l %0h/%0h r %0h/%0h int %0d%0d/%0d%0d", i, l_rdata[i], mlr[i],
                     r_rdata[i], mrr[i], l_int[i], r_int[i], mli, mri);
        end
      end
    end
    // Semaphores.
    @(negedge clk);
    l_en = 0; r_en = 0;
    l_sem_req = 1; l_sem_idx = 3; r_sem_req = 1; r_sem_idx = 3;   // both ask: left gets it
    @(negedge clk);
    checks++;
    if (l_sem_own[0] != 8'h08 || r_sem_own[0] != 8'h00) begin failures++; $display("sem 1"); end
    l_sem_req = 0; r_sem_idx = 5;                                 // right takes a free one
    @(negedge clk);
    checks++;
    if (l_sem_own[0] != 8'h08 || r_sem_own[0] != 8'h20) begin failures++; $display("sem 2"); end
    r_sem_req = 0; r_sem_rel = 1; r_sem_idx = 3;                  // right cannot free left's
    @(negedge clk);
    checks++;
    if (l_sem_own[1] != 8'h08 || r_sem_own[1] != 8'h20) begin failures++; $display("sem 3"); end
    r_sem_rel = 0; l_sem_rel = 1; l_sem_idx = 3;                  // left frees it
    r_sem_req = 1; r_sem_idx = 3;                                 // right asks, still held
    @(negedge clk);
    checks++;
    if (l_sem_own[0] != 8'h00 || r_sem_own[0] != 8'h20) begin failures++; $display("sem 4"); end
    l_sem_rel = 0;
    @(negedge clk);
    checks++;
    if (r_sem_own[0] != 8'h28) begin failures++; $display("sem 5"); end
    r_sem_req = 0;
    checks++;
    if (l_wins == 0 || r_wins == 0 || l_ints == 0 || r_ints == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("collisions won left=%0d right=%0d, interrupts left=%0d right=%0d", l_wins, r_wins,
             l_ints, r_ints);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
