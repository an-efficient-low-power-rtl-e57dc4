// dpram: true dual-port RAM with busy arbitration, interrupt mailboxes and semaphore flags.
//
// Two fully independent ports, left (l_*) and right (r_*), each with enable, write enable,
// address, write data and read data, access one array of DEPTH words of DW bits. Reads are
// synchronous: read data appears in the cycle after an enabled access and holds while the port
// is idle. What a writing port's read data shows is set per port by L_MODE / R_MODE:
// WRITE_FIRST (the new word), READ_FIRST (the old word) or NO_CHANGE (unchanged).
//
// Control logic around the array:
//   * Busy: if both ports address the same word in one cycle and at least one writes, one port
//     wins and the other sees its busy line high in that cycle; the loser's access (read or
//     write) is dropped. Priority alternates: after a collision the loser wins the next one.
//     The left port wins the first collision after reset.
//   * Interrupts: a right-port write to word DEPTH-1 raises l_int; a left-port read of that
//     word clears it. A left-port write to word DEPTH-2 raises r_int; a right-port read of
//     that word clears it. The words are ordinary storage too (mailboxes).
//   * Semaphores: NSEM flags, each free or owned by one port. *_sem_req with *_sem_idx takes a
//     flag if it is free (left first if both ask in one cycle); *_sem_rel frees a flag the port
//     owns. *_sem_own shows the flags each port holds, from the register.
//
// Independent ports, the read/write modes, busy, interrupt and semaphore logic are named in the
// source description; their exact rules (priority, mailbox addresses, number of flags) are this
// design's choices. The array has no reset; busy, interrupt and semaphore state reset
// synchronously (rst_n low).
module dpram
  import vd_pkg::*;
#(
  parameter int unsigned DW     = 4,
  parameter int unsigned DEPTH  = 20,
  parameter dp_mode_e    L_MODE = READ_FIRST,
  parameter dp_mode_e    R_MODE = READ_FIRST,
  parameter int unsigned NSEM   = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SIW   = (NSEM > 1) ? $clog2(NSEM) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // left port
  input  logic            l_en,
  input  logic            l_we,
  input  logic [AW-1:0]   l_addr,
  input  logic [DW-1:0]   l_wdata,
  output logic [DW-1:0]   l_rdata,
  output logic            l_busy,
  output logic            l_int,
  input  logic            l_sem_req,
  input  logic            l_sem_rel,
  input  logic [SIW-1:0]  l_sem_idx,
  output logic [NSEM-1:0] l_sem_own,
  // right port
  input  logic            r_en,
  input  logic            r_we,
  input  logic [AW-1:0]   r_addr,
  input  logic [DW-1:0]   r_wdata,
  output logic [DW-1:0]   r_rdata,
  output logic            r_busy,
  output logic            r_int,
  input  logic            r_sem_req,
  input  logic            r_sem_rel,
  input  logic [SIW-1:0]  r_sem_idx,
  output logic [NSEM-1:0] r_sem_own
);

  localparam logic [AW-1:0] MBOX_L = AW'(DEPTH - 1);  // right writes, left reads
  localparam logic [AW-1:0] MBOX_R = AW'(DEPTH - 2);  // left writes, right reads

  logic [DW-1:0] mem [DEPTH];
  logic          prio_r;      // right port wins the next collision
  logic          collide;
  logic          l_go, r_go;  // access proceeds
  sem_owner_e    sem [NSEM];

  always_comb begin
    collide = l_en && r_en && (l_addr == r_addr) && (l_we || r_we);
    l_busy  = collide && prio_r;
    r_busy  = collide && !prio_r;
    l_go    = l_en && !l_busy;
    r_go    = r_en && !r_busy;
  end

  // Memory array and read registers.
  always_ff @(posedge clk) begin
    if (l_go) begin
      if (l_we) begin
        mem[l_addr] <= l_wdata;
        if (L_MODE == WRITE_FIRST)     l_rdata <= l_wdata;
        else if (L_MODE == READ_FIRST) l_rdata <= mem[l_addr];
      end else begin
        l_rdata <= mem[l_addr];
      end
    end
    if (r_go) begin
      if (r_we) begin
        mem[r_addr] <= r_wdata;
        if (R_MODE == WRITE_FIRST)     r_rdata <= r_wdata;
        else if (R_MODE == READ_FIRST) r_rdata <= mem[r_addr];
      end else begin
        r_rdata <= mem[r_addr];
      end
    end
  end

  // Busy priority, interrupts and semaphores.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio_r <= 1'b0;
      l_int  <= 1'b0;
      r_int  <= 1'b0;
      for (int i = 0; i < NSEM; i++) sem[i] <= SEM_FREE;
    end else begin
      if (collide) prio_r <= !prio_r;

      if (l_go && !l_we && l_addr == MBOX_L) l_int <= 1'b0;
      if (r_go &&  r_we && r_addr == MBOX_L) l_int <= 1'b1;
      if (r_go && !r_we && r_addr == MBOX_R) r_int <= 1'b0;
      if (l_go &&  l_we && l_addr == MBOX_R) r_int <= 1'b1;

      for (int i = 0; i < NSEM; i++) begin
        if (sem[i] == SEM_FREE) begin
          if (l_sem_req && l_sem_idx == SIW'(i))      sem[i] <= SEM_LEFT;
          else if (r_sem_req && r_sem_idx == SIW'(i)) sem[i] <= SEM_RIGHT;
        end else if (sem[i] == SEM_LEFT) begin
          if (l_sem_rel && l_sem_idx == SIW'(i)) sem[i] <= SEM_FREE;
        end else if (sem[i] == SEM_RIGHT) begin
          if (r_sem_rel && r_sem_idx == SIW'(i)) sem[i] <= SEM_FREE;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NSEM; i++) begin
      l_sem_own[i] = (sem[i] == SEM_LEFT);
      r_sem_own[i] = (sem[i] == SEM_RIGHT);
    end
  end

endmodule
