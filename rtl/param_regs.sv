// param_regs: parameter and command registers set from the PC over RS232,
// and read-back of the drive's state and measurements for display.
// Protocol (this design's own; the source gives none): a write is three bytes
// {addr, data[15:8], data[7:0]} with addr < 16; a read request is one byte
// {1'b1, addr[6:0]} and is answered with the two bytes data[15:8], data[7:0].
// Read addresses 0..15 return the parameter registers, 16..31 the status
// words on `status`. Writable registers (reset values in DEFAULTS):
//   0 speed reference w_ref      4 Kp             8 logical outputs (8 switches)
//   1 command bits               5 Ki (Ki/Ti)     9 scope signal select
//   2 filter update period "per" 6 filter gain A  10 profile ramp step
//   3 hysteresis band "hist"     7 filter gain B  11..15 spare
// Command bits: [0] main switch ON, [4] profile generator on; [1] START,
// [2] STOP and [3] manual error reset are one-clock pulses (self-clearing).
// param_reset (from the supervisor's reset state) restores the reset values
// of registers 1..15 except the main-switch bit and the outputs, and clears
// the speed reference.
module param_regs #(
  parameter logic [15:0] DEFAULTS [16] = '{16'd0, 16'h0010, 16'd50, 16'd20,
                                           16'd4000, 16'd200, 16'd255, 16'd255,
                                           16'd0, 16'd0, 16'd2, 16'd0,
                                           16'd0, 16'd0, 16'd0, 16'd0}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic [7:0]  tx_data,
  output logic        tx_start,
  input  logic        tx_busy,
  input  logic        param_reset,
  input  logic [15:0] status [16],
  output logic [15:0] regs [16],
  output logic        cmd_start,
  output logic        cmd_stop,
  output logic        cmd_ack
);
  typedef enum logic [2:0] {P_ADDR, P_HI, P_LO, P_TX_HI, P_TX_WAIT, P_TX_LO} st_t;
  st_t        st;
  logic [3:0] waddr;
  logic [7:0] hi;
  logic [15:0] rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_ADDR; waddr <= '0; hi <= '0; rdata <= '0;
      tx_data <= '0; tx_start <= 1'b0;
      for (int i = 0; i < 16; i++) regs[i] <= DEFAULTS[i];
    end else begin
      tx_start <= 1'b0;
      regs[1][3:1] <= 3'b000;                 // pulse commands self-clear
      if (param_reset) begin
        regs[0] <= '0;
        regs[1] <= {DEFAULTS[1][15:1], regs[1][0]} & ~16'h000e;
        for (int i = 2; i < 16; i++) if (i != 8) regs[i] <= DEFAULTS[i];
      end
      unique case (st)
        P_ADDR: if (rx_valid) begin
          if (rx_data[7]) begin
            rdata <= (rx_data[6:4] == 3'd0) ? regs[rx_data[3:0]]
                   : (rx_data[6:4] == 3'd1) ? status[rx_data[3:0]] : 16'h0000;
            st <= P_TX_HI;
          end else if (rx_data[6:4] == 3'd0) begin
            waddr <= rx_data[3:0];
            st    <= P_HI;
          end
        end
        P_HI: if (rx_valid) begin hi <= rx_data; st <= P_LO; end
        P_LO: if (rx_valid) begin regs[waddr] <= {hi, rx_data}; st <= P_ADDR; end
        P_TX_HI: if (!tx_busy) begin tx_data <= rdata[15:8]; tx_start <= 1'b1; st <= P_TX_WAIT; end
        P_TX_WAIT: if (tx_busy) st <= P_TX_LO;   // wait for the first byte to be taken
        P_TX_LO: if (!tx_busy && !tx_start) begin tx_data <= rdata[7:0]; tx_start <= 1'b1; st <= P_ADDR; end
        default: st <= P_ADDR;
      endcase
    end
  end

  assign cmd_start = regs[1][1];
  assign cmd_stop  = regs[1][2];
  assign cmd_ack   = regs[1][3];
endmodule
