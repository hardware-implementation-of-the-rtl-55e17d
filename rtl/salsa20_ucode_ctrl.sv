// Microprogrammed controller of the compact FPGA Salsa20.
//
// An address generator (a small FSM and the micro-program counter) walks
// through the microprogram ROM; each ROM word is loaded into the
// instruction register, whose fields are the datapath's control signals for
// that cycle (see salsa20_ucode_pkg). This structure - FSM, counter, ROM,
// instruction register - follows the document. The FSM inspects the word
// being fetched: at the double-round loop's last word it jumps back to the
// loop start until the loop has run 10 times, and at the halt word it stops.
// The ROM contents are the constant function ucode(), i.e. fixed at
// configuration time.
//
// Timing: start in IDLE begins fetching at address 0; the first control
// word is in the instruction register one cycle later. busy is high while
// control words are issued; done pulses for one cycle while the halt word
// sits in the instruction register. One run issues 32 + 10*128 + 48 + 1 = 1361 words.
module salsa20_ucode_ctrl
  import salsa20_pkg::*;
  import salsa20_ucode_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  output uinst_t uinst,
  output logic   busy,
  output logic   done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t               state;
  logic [UPC_BITS-1:0]  upc;
  logic [3:0]           loops;
  uinst_t               fetched;

  // Microprogram ROM.
  assign fetched = ucode(32'(upc));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      upc   <= '0;
      loops <= '0;
      uinst <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          uinst <= '0;
          if (start) begin
            state <= S_RUN;
            upc   <= UPC_BITS'(LOAD_START);
            loops <= '0;
          end
        end
        S_RUN: begin
          uinst <= fetched;
          if (fetched.halt) begin
            state <= S_DONE;
          end else if (fetched.loop_end && loops != 4'(LOOPS - 1)) begin
            loops <= loops + 4'd1;
            upc   <= UPC_BITS'(LOOP_START);
          end else begin
            upc <= upc + 1'b1;
          end
        end
        default: begin
          uinst <= '0;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);

endmodule
