// message_port: Cascade's external message port, a four-phase
// request/acknowledge handshake with a 20-bit data bus (modelled as
// separate in and out buses). The host puts data on data_i and raises
// req_i. When the core is ready (ready_i) the port latches the data and
// presents it to the core with a one-cycle rx_valid_o. The core answers with
// tx_valid_i/tx_data_i; the port then drives tx_data_i on data_o and raises
// ack_o, and holds both until the host drops req_i. Every transfer cycle thus
// carries one word in each direction; a message is a sequence of such cycles.
// The host is assumed synchronous to clk; the split bus and the per-cycle
// reply word are this design's own reading of the bus description.
module message_port #(
  parameter int unsigned DATA_BITS = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_i,
  input  logic [DATA_BITS-1:0] data_i,
  output logic                 ack_o,
  output logic [DATA_BITS-1:0] data_o,
  input  logic                 ready_i,
  output logic                 rx_valid_o,
  output logic [DATA_BITS-1:0] rx_data_o,
  input  logic                 tx_valid_i,
  input  logic [DATA_BITS-1:0] tx_data_i
);
  typedef enum logic [1:0] {P_IDLE, P_BUSY, P_ACK} pstate_e;
  pstate_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE; ack_o <= 1'b0; data_o <= '0; rx_valid_o <= 1'b0; rx_data_o <= '0;
    end else begin
      rx_valid_o <= 1'b0;
      unique case (state)
        P_IDLE: if (req_i && ready_i) begin
          rx_data_o  <= data_i;
          rx_valid_o <= 1'b1;
          state      <= P_BUSY;
        end
        P_BUSY: if (tx_valid_i) begin
          data_o <= tx_data_i;
          ack_o  <= 1'b1;
          state  <= P_ACK;
        end
        P_ACK: if (!req_i) begin
          ack_o <= 1'b0;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // handshake rules: the host holds req until it sees ack, and the core
  // answers only a transfer it has been given
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               $fell(req_i) |-> ack_o);
  a_tx_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                  tx_valid_i |-> state == P_BUSY);
endmodule
