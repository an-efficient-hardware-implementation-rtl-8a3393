// ahb_master: AMBA 2.0 AHB bus master through which the engine reads and
// writes ant packets, the routing table and the local traffic model in
// system memory.
//
// It performs one single 32-bit transfer per request (HBURST = SINGLE,
// HSIZE = word, HPROT = data access). Sequence: on `req` it raises HBUSREQ;
// once HGRANT and HREADY are both high at a clock edge it owns the address
// bus and drives a NONSEQ address phase for one cycle (longer while HREADY
// is low); the data phase follows and ends at the first edge with HREADY
// high, when read data is captured and `done` pulses. HBUSREQ drops with
// the address phase. An ERROR response is reported on `err` with `done`.
// The engine is specified only as an AHB master with 32-bit address and
// data; single transfers and this request handshake are this design's
// choice. The user side must hold req, we, addr and wdata until done.
module ahb_master (
  input  logic        hclk,
  input  logic        hresetn,
  // user side
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        done,
  output logic        err,
  output logic [31:0] rdata,
  // AHB master port
  output logic        hbusreq,
  output logic        hlock,
  input  logic        hgrant,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [3:0]  hprot,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic [1:0]  hresp
);
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HRESP_ERROR   = 2'b01;

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_ADDR, M_DATA} mstate_e;
  mstate_e state;

  logic        we_q;
  logic [31:0] addr_q, wdata_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state   <= M_IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      done    <= 1'b0;
      err     <= 1'b0;
      rdata   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (req && !done) begin
          we_q    <= we;
          addr_q  <= addr;
          wdata_q <= wdata;
          state   <= M_REQ;
        end
        M_REQ:  if (hgrant && hready) state <= M_ADDR;
        M_ADDR: if (hready) state <= M_DATA;
        M_DATA: if (hready) begin
          rdata <= hrdata;
          err   <= (hresp == HRESP_ERROR);
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assign hbusreq = (state == M_REQ);
  assign hlock   = 1'b0;
  assign htrans  = (state == M_ADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr   = addr_q;
  assign hwrite  = we_q;
  assign hsize   = 3'b010;   // 32-bit
  assign hburst  = 3'b000;   // SINGLE
  assign hprot   = 4'b0001;  // data access
  assign hwdata  = wdata_q;

  // A transfer may only be started while the master is granted, and the
  // address phase must hold its address and direction while HREADY is low.
  a_addr_stable: assert property (@(posedge hclk) disable iff (!hresetn)
    (htrans == HTRANS_NONSEQ && !hready) |=> ($stable(haddr) && $stable(hwrite)));
  a_word_aligned: assert property (@(posedge hclk) disable iff (!hresetn)
    (htrans == HTRANS_NONSEQ) |-> (haddr[1:0] == 2'b00));
endmodule
