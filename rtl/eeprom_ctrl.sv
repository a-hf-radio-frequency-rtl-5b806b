// eeprom_ctrl: EEPROM controller, the access mechanism of the array.
//
// Takes one operation at a time from the EEPROM interface (read, erase or
// program of one 32-bit block) and sequences the analog driver for it. A read
// raises read_en for T_SENSE + 1 cycles and latches the sensed word. An erase
// or a program switches the high-voltage pump on, waits for hv_ok, applies the
// erase or program pulse for T_PULSE cycles with address and data held
// steady, then drops the pulse and, one cycle later, the pump. That an EEPROM
// controller drives the array through an analog driver follows the design;
// the sequence and its timings are this implementation's choice.
//
// Interface: start (one cycle, while not busy) with op/addr/wdata; done pulses
// when the operation is over, rdata holds the word of the last read.
// Timing: read = T_SENSE + 3 cycles; erase or program = pump ramp + T_PULSE
// + 3 cycles.
//
// The assertions at the end check the interface rules in simulation. Their
// `disable iff (!rst_n)` is the only place where rst_n is read as a plain
// signal, which is why lint tools report rst_n as used both as an
// asynchronous reset and synchronously; no hardware is built from it.
module eeprom_ctrl
  import rfid_pkg::*;
#(
  parameter int unsigned T_PULSE = 13560,  // 1 ms at 13.56 MHz
  parameter int unsigned T_SENSE = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // EEPROM interface
  input  logic   start,
  input  ee_op_e op,
  input  blk_t   addr,
  input  word_t  wdata,
  output logic   busy,
  output logic   done,
  output word_t  rdata,
  // analog driver
  output logic   hv_en,
  input  logic   hv_ok,
  output blk_t   row,
  output word_t  din,
  output logic   erase,
  output logic   prog,
  output logic   read_en,
  input  word_t  dout
);
  typedef enum logic [2:0] {E_IDLE, E_READ, E_RAMP, E_PULSE, E_END} est_e;
  est_e st;
  ee_op_e op_q;
  logic [$clog2(T_PULSE + T_SENSE + 2)-1:0] cnt;

  assign busy = (st != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; op_q <= EE_READ; cnt <= '0;
      row <= '0; din <= '0; rdata <= '0;
      hv_en <= 1'b0; erase <= 1'b0; prog <= 1'b0; read_en <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        E_IDLE: if (start) begin
          op_q <= op;
          row  <= addr;
          din  <= wdata;
          cnt  <= '0;
          if (op == EE_READ) begin
            read_en <= 1'b1;
            st      <= E_READ;
          end else begin
            hv_en <= 1'b1;
            st    <= E_RAMP;
          end
        end
        E_READ: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(T_SENSE)) begin
            rdata   <= dout;
            read_en <= 1'b0;
            done    <= 1'b1;
            st      <= E_IDLE;
          end
        end
        E_RAMP: if (hv_ok) begin
          erase <= (op_q == EE_ERASE);
          prog  <= (op_q == EE_PROG);
          cnt   <= '0;
          st    <= E_PULSE;
        end
        E_PULSE: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(T_PULSE)) begin
            erase <= 1'b0;
            prog  <= 1'b0;
            st    <= E_END;
          end
        end
        E_END: begin
          hv_en <= 1'b0;
          done  <= 1'b1;
          st    <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  // array rules: one pulse kind at a time, only with the pump up, never
  // while sensing; address and data stable during a pulse
  a_one_pulse: assert property (@(posedge clk) disable iff (!rst_n) !(erase && prog));
  a_pulse_hv:  assert property (@(posedge clk) disable iff (!rst_n) (erase || prog) |-> (hv_en && hv_ok));
  a_no_rd_hv:  assert property (@(posedge clk) disable iff (!rst_n) !(read_en && hv_en));
  a_row_hold:  assert property (@(posedge clk) disable iff (!rst_n) (erase || prog) |=> $stable(row) && $stable(din));
endmodule
