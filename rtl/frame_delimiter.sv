// frame_delimiter -- cuts the received byte stream into ITCH messages.
//
// The market-data source sends each message as a 0x00 start byte, a
// two-byte big-endian message length and then the message itself. This FSM
// hunts for the start byte (HUNT), reads the two length bytes (LEN_HI,
// LEN_LO) and then forwards exactly that many body bytes (BODY), marking the
// first with sof and the last with eom, and presenting the message length
// alongside. A zero length returns to HUNT at once.
//
// A byte that arrived with a UART framing error raises ferr for one cycle
// and the FSM returns to HUNT; if a message was being forwarded, that byte
// goes out with out_abort set instead of data, so that the parser discards
// the partial message.
//
// Interface: a valid/ready byte stream in and out. in_ready follows
// out_ready, so a stalled parser backs up into the receive FIFO. sof, eom,
// out_abort and len travel with out_valid.
//
// The framing format is the one the market-data simulator writes; the error
// handling and the valid/ready handshake are this design's own choices.
module frame_delimiter (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_ferr,     // byte had a framing error
  output logic        in_ready,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sof,
  output logic        out_eom,
  output logic [15:0] out_len,
  input  logic        out_ready,
  output logic        out_abort,   // one cycle: drop the partial message
  output logic        ferr         // one cycle: a framing error was seen
);

  typedef enum logic [1:0] {HUNT, LEN_HI, LEN_LO, BODY} state_e;

  state_e      state;
  logic [15:0] len, remaining;
  logic        take;

  assign in_ready  = out_ready;
  assign take      = in_valid && in_ready;
  assign out_valid = take && (state == BODY);
  assign out_data  = in_data;
  assign out_sof   = (remaining == len);
  assign out_eom   = (remaining == 16'd1);
  assign out_len   = len;
  assign ferr      = take && in_ferr;
  assign out_abort = ferr && (state == BODY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= HUNT;
      len       <= '0;
      remaining <= '0;
    end else if (take) begin
      if (in_ferr) begin
        state <= HUNT;
      end else begin
        unique case (state)
          HUNT:   if (in_data == 8'h00) state <= LEN_HI;
          LEN_HI: begin
            len[15:8] <= in_data;
            state     <= LEN_LO;
          end
          LEN_LO: begin
            len[7:0]  <= in_data;
            remaining <= {len[15:8], in_data};
            state     <= ({len[15:8], in_data} == 16'd0) ? HUNT : BODY;
          end
          BODY: begin
            remaining <= remaining - 16'd1;
            if (remaining == 16'd1) state <= HUNT;
          end
        endcase
      end
    end
  end

endmodule
