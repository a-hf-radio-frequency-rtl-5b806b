// mem_ctrl: memory controller of the tag (the EEPROM interface side).
//
// Serves block reads and writes of the data flow with the erase, read and
// program operations of the EEPROM controller. A write is an erase of the
// block followed by a program of the new word. After reset the controller
// boot-loads the blocks the tag needs at every request into registers: the
// 64-bit UID (blocks 0-1), the configuration block (AFI, DSFID, AFI lock) and
// the 64 block-lock bits (blocks 3-4); writes to those blocks keep the copies
// current. As the last line of the write-once rule, a write to a block whose
// lock bit is set is refused (err with ack) without touching the array.
// That a memory controller manages all EEPROM accesses through an EEPROM
// interface follows the design; boot loading, the memory map and the lock
// check here are this implementation's choices.
//
// Interface: req_valid is held with req until ack (one cycle); rdata is valid
// with ack of a read; err with ack means the write was refused. boot_done
// rises once the copies are loaded; no request is taken before.
//
// The assertions at the end check the interface rules in simulation. Their
// `disable iff (!rst_n)` is the only place where rst_n is read as a plain
// signal, which is why lint tools report rst_n as used both as an
// asynchronous reset and synchronously; no hardware is built from it.
module mem_ctrl
  import rfid_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // data flow side
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     ack,
  output logic     err,
  output word_t    rdata,
  output logic     boot_done,
  output logic [63:0] uid,
  output logic [7:0]  afi,
  output logic [7:0]  dsfid,
  output logic        afi_lock,
  output logic [63:0] lock_bits,
  // EEPROM interface to the EEPROM controller
  output logic     ee_start,
  output ee_op_e   ee_op,
  output blk_t     ee_addr,
  output word_t    ee_wdata,
  input  logic     ee_done,
  input  word_t    ee_rdata
);
  typedef enum logic [2:0] {M_BOOT, M_BOOT_W, M_IDLE, M_READ, M_ERASE, M_PROG} mst_e;
  mst_e st;
  blk_t boot_blk;

  // keep the register copies of blocks 0..4 current
  task automatic mirror(input blk_t b, input word_t w);
    case (int'(b))
      BLK_UID0:   uid[31:0]        <= w;
      BLK_UID1:   uid[63:32]       <= w;
      BLK_CONFIG: begin afi <= w[7:0]; dsfid <= w[15:8]; afi_lock <= w[16]; end
      BLK_LOCK0:  lock_bits[31:0]  <= w;
      BLK_LOCK1:  lock_bits[63:32] <= w;
      default: ;
    endcase
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_BOOT; boot_blk <= '0; boot_done <= 1'b0;
      ack <= 1'b0; err <= 1'b0; rdata <= '0;
      uid <= '0; afi <= '0; dsfid <= '0; afi_lock <= 1'b0; lock_bits <= '0;
      ee_start <= 1'b0; ee_op <= EE_READ; ee_addr <= '0; ee_wdata <= '0;
    end else begin
      ack      <= 1'b0;
      err      <= 1'b0;
      ee_start <= 1'b0;
      case (st)
        M_BOOT: begin
          ee_start <= 1'b1; ee_op <= EE_READ; ee_addr <= boot_blk;
          st <= M_BOOT_W;
        end
        M_BOOT_W: if (ee_done) begin
          mirror(boot_blk, ee_rdata);
          if (int'(boot_blk) == BLK_LOCK1) begin
            boot_done <= 1'b1;
            st <= M_IDLE;
          end else begin
            boot_blk <= boot_blk + 1'b1;
            st <= M_BOOT;
          end
        end
        M_IDLE: if (req_valid && !ack) begin
          ee_addr  <= req.addr;
          ee_wdata <= req.wdata;
          if (!req.we) begin
            ee_start <= 1'b1; ee_op <= EE_READ; st <= M_READ;
          end else if (lock_bits[req.addr]) begin
            ack <= 1'b1; err <= 1'b1;
          end else begin
            ee_start <= 1'b1; ee_op <= EE_ERASE; st <= M_ERASE;
          end
        end
        M_READ: if (ee_done) begin
          rdata <= ee_rdata;
          ack   <= 1'b1;
          st    <= M_IDLE;
        end
        M_ERASE: if (ee_done) begin
          ee_start <= 1'b1; ee_op <= EE_PROG; st <= M_PROG;
        end
        M_PROG: if (ee_done) begin
          mirror(ee_addr, ee_wdata);
          ack <= 1'b1;
          st  <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  // handshake: a request is held, unchanged, until it is acknowledged
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               req_valid && !ack |=> req_valid && $stable(req));
  a_ee_start: assert property (@(posedge clk) disable iff (!rst_n) ee_start |=> !ee_start);
endmodule
