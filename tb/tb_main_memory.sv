// tb_main_memory: behavioural model of the word-addressable main memory,
// for testbenches only.
//
// A 24-bit word address space whose unwritten words read as a fixed
// function of the address (init_word); written words are kept in an
// associative array. A read (memRead) or write (memWrite) request is
// sampled when the model is idle, answered after a random latency of
// MIN_LAT..MAX_LAT cycles by a one-cycle dataReadyFromMem pulse (with the
// data for a read), and the model then goes idle again, so a new request
// is taken no earlier than the cycle after the answer. It counts the
// reads and writes it served.
module tb_main_memory #(
  parameter int unsigned MIN_LAT = 1,
  parameter int unsigned MAX_LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        memRead,
  input  logic        memWrite,
  input  logic [23:0] addrToMem,
  input  logic [31:0] dataToMem,
  output logic        dataReadyFromMem,
  output logic [31:0] dataFromMem
);

  logic [31:0] store [logic [23:0]];
  int unsigned reads, writes;

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_ACK} mstate_e;
  mstate_e     st;
  int unsigned wait_cnt;
  logic        op_wr;
  logic [23:0] op_addr;
  logic [31:0] op_data;

  function automatic logic [31:0] init_word(logic [23:0] a);
    return (32'(a) * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] peek(logic [23:0] a);
    if (store.exists(a)) return store[a];
    return init_word(a);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= M_IDLE;
      dataReadyFromMem <= 1'b0;
      dataFromMem      <= '0;
      wait_cnt         <= 0;
      reads            <= 0;
      writes           <= 0;
    end else begin
      dataReadyFromMem <= 1'b0;
      case (st)
        M_IDLE: if (memRead || memWrite) begin
          op_wr    <= memWrite;
          op_addr  <= addrToMem;
          op_data  <= dataToMem;
          wait_cnt <= MIN_LAT + ($urandom % (MAX_LAT - MIN_LAT + 1)) - 1;
          st       <= M_WAIT;
        end
        M_WAIT: if (wait_cnt == 0) begin
          if (op_wr) begin
            store[op_addr] = op_data;
            writes         <= writes + 1;
          end else begin
            dataFromMem <= peek(op_addr);
            reads       <= reads + 1;
          end
          dataReadyFromMem <= 1'b1;
          st               <= M_ACK;
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
