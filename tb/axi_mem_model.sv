// axi_mem_model: behavioural model of the board memory (HBM/DDR4 behind AXI).
//
// Testbench-only AXI4 slave with INCR bursts. Storage is sparse (associative
// array of DATA_W-bit words keyed by word address). A word never written
// reads as init_word(word address), a fixed pattern the testbenches can
// recompute. Write: AW accepted when idle, one W beat per cycle (wready
// high), one B response after wlast. Read: AR accepted when idle, R beats one
// per cycle with rlast on the last. Counts the bursts it served.
module axi_mem_model #(
  parameter int unsigned ADDR_W = 34,
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic              awvalid,
  output logic              awready,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic              arvalid,
  output logic              arready,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready
);
  localparam int unsigned SH = $clog2(DATA_W / 8);

  logic [DATA_W-1:0] mem [longint unsigned];
  int unsigned       n_wbursts = 0, n_rbursts = 0;

  function automatic logic [DATA_W-1:0] init_word(input longint unsigned wa);
    logic [DATA_W-1:0] v;
    for (int i = 0; i < DATA_W; i += 32) v[i +: 32] = 32'(wa * 32'h9E3779B1 + 32'(i) + 32'h1234567);
    return v;
  endfunction

  function automatic logic [DATA_W-1:0] peek(input longint unsigned wa);
    return mem.exists(wa) ? mem[wa] : init_word(wa);
  endfunction

  typedef enum logic [1:0] {M_IDLE, M_W, M_B, M_R} m_state_t;
  m_state_t        st;
  longint unsigned wa;
  int unsigned     left;

  assign awready = (st == M_IDLE);
  assign arready = (st == M_IDLE) && !awvalid;
  assign wready  = (st == M_W);
  assign bvalid  = (st == M_B);
  assign bresp   = 2'b00;
  assign rvalid  = (st == M_R);
  assign rresp   = 2'b00;
  assign rdata   = peek(wa);
  assign rlast   = (st == M_R) && left == 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= M_IDLE;
      wa   <= 0;
      left <= 0;
    end else begin
      case (st)
        M_IDLE: if (awvalid) begin
          wa <= longint'(awaddr >> SH); left <= awlen; st <= M_W; n_wbursts <= n_wbursts + 1;
        end else if (arvalid) begin
          wa <= longint'(araddr >> SH); left <= arlen; st <= M_R; n_rbursts <= n_rbursts + 1;
        end
        M_W: if (wvalid) begin
          mem[wa] = wdata;
          wa      <= wa + 1;
          if (wlast) st <= M_B;
          else left <= left - 1;
        end
        M_B: if (bready) st <= M_IDLE;
        M_R: if (rready) begin
          wa <= wa + 1;
          if (left == 0) st <= M_IDLE;
          else left <= left - 1;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
